// tb_xfer_sync_fsm: self-checking testbench of the software-coordination
// machine. Runs many transfers with random delays, following the software
// order (clear done, set ack, transfer, clear ack, set done), and checks every
// cycle that the interrupt is raised exactly while a request is waiting for
// acknowledge, that it stays masked during the transfer, and that the
// completion pulse comes exactly once per transfer and never while ack is still
// set. It also leaves done set from the previous transfer and sets ack late, to
// show that a stale done does not end a new transfer.
module tb_xfer_sync_fsm;
  logic clk = 0, rst, req, sw_ack, sw_done, irq, busy, xfer_done;
  int checks = 0, failures = 0, n_xfer = 0, n_stale = 0;

  xfer_sync_fsm dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  // expected phase: 0 idle, 1 interrupting, 2 transferring
  int phase;
  always @(posedge clk) if (!rst) begin
    #1;
    check(irq == (phase == 1), "interrupt level");
    check(busy == (phase != 0), "busy level");
  end

  initial begin
    rst = 1; req = 0; sw_ack = 0; sw_done = 0; phase = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      int d;
      d = $urandom_range(0, 5);
      repeat (d) @(posedge clk);
      #2 req = 1;
      @(posedge clk);
      phase = 1;
      // software: interrupt seen after some cycles; done is still set from before
      d = $urandom_range(1, 6);
      for (int i = 0; i < d; i++) begin
        @(posedge clk);
        #2 check(!xfer_done, "no completion before acknowledge (stale done)");
        if (sw_done) n_stale++;
      end
      sw_done = 0;
      @(posedge clk);
      #2 sw_ack = 1;
      @(posedge clk);
      phase = 2;
      d = $urandom_range(1, 8);
      for (int i = 0; i < d; i++) begin
        @(posedge clk);
        #2 check(!xfer_done, "no completion during transfer");
      end
      sw_ack = 0;
      @(posedge clk);
      #2 check(!xfer_done, "no completion before done");
      sw_done = 1;
      #1 check(xfer_done, "completion when done is set after ack is cleared");
      @(posedge clk);
      phase = 0;
      n_xfer++;
      #1 req = 0;
      @(posedge clk);
      #2 check(!xfer_done, "completion is one pulse");
    end
    $display("transfers=%0d stale-done cycles=%0d", n_xfer, n_stale);
    check(n_stale > 0, "stale done exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
