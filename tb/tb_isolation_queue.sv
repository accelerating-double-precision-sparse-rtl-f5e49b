// tb_isolation_queue: self-checking testbench of the split data/tag FIFO.
//
// Pushes and pops at random rates (never into a full or out of an empty
// queue), compares every popped product and tag with a reference queue, and
// checks the count, empty and full flags every cycle. Both the full and the
// empty state are required to occur.
module tb_isolation_queue;
  import spmv_pkg::*;
  localparam int DEPTH = MULT_LAT + VEC_RD_LAT;

  logic      clk = 0, rst;
  logic      push, pop, empty, full;
  dword_t    push_data, pop_data;
  psum_tag_t push_tag, pop_tag;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  isolation_queue dut (.*);

  always #5 clk = ~clk;

  typedef struct packed { dword_t d; psum_tag_t t; } item_t;
  item_t ref_q [$];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    rst = 1; push = 0; pop = 0; push_data = '0; push_tag = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 5000; i++) begin
      int bias;
      // alternate phases that fill and drain the queue
      bias = ((i / 200) % 2 == 0) ? 3 : 1;
      @(negedge clk);
      check(int'(count) == ref_q.size(), "count");
      check(empty == (ref_q.size() == 0), "empty flag");
      check(full == (ref_q.size() == DEPTH), "full flag");
      n_full += full; n_empty += empty;
      if (!empty) begin
        item_t e;
        e = ref_q[0];
        check(pop_data == e.d && pop_tag == e.t, $sformatf("head entry %h %h exp %h %h", pop_data, pop_tag, e.d, e.t));
      end
      pop  = !empty && ($urandom_range(0, 3) >= bias);
      push = (!full || pop) && ($urandom_range(0, 3) < bias);
      push_data = {$urandom(), $urandom()};
      push_tag  = psum_tag_t'({$urandom(), $urandom()});
      @(posedge clk);
      if (pop)  void'(ref_q.pop_front());
      if (push) ref_q.push_back({push_data, push_tag});
    end
    check(n_full > 0, "queue became full");
    check(n_empty > 0, "queue became empty");
    $display("full=%0d empty=%0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
