// tb_port_fifo: order, thresholds, full/empty and error pulses of a port FIFO.
//
// Random pushes and pops are checked against a queue model for 2000 cycles;
// count, hi_thresh (count >= 48) and lo_thresh (count <= 8) are compared
// with the model every cycle. Then the FIFO is filled to overflow and
// drained to underflow, and both error pulses must appear.
module tb_port_fifo;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [31:0] din, dout;
  logic empty, full, hi_thresh, lo_thresh, overflow, underflow;
  logic [6:0] count;
  logic [6:0] cfg_hi = 48, cfg_lo = 8;
  int checks = 0, failures = 0;

  port_fifo dut (.*);

  always #5 clk = ~clk;

  logic [31:0] model [$];
  int ovf = 0, udf = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // compare state before this cycle's operations
      chk("count", count, model.size());
      chk("hi", hi_thresh, model.size() >= 48);
      chk("lo", lo_thresh, model.size() <= 8);
      if (model.size() > 0) chk("dout", dout, model[0]);
      push = ($urandom % 100) < ((i / 500) % 2 ? 35 : 65);
      pop  = ($urandom % 100) < ((i / 500) % 2 ? 65 : 35);
      din  = $urandom;
      @(posedge clk);
      begin
        // a push into a full FIFO is dropped even if a pop frees a slot
        bit acc_push;
        acc_push = push && model.size() < 64;
        if (pop && model.size() > 0) void'(model.pop_front());
        if (acc_push) model.push_back(din);
      end
    end
    @(negedge clk); pop = 0; push = 1;
    repeat (70) begin @(negedge clk); if (overflow) ovf++; end
    chk("full", full, 1);
    checks++; if (ovf == 0) begin failures++; $display("FAIL no overflow pulse"); end
    push = 0; pop = 1;
    repeat (70) begin @(negedge clk); if (underflow) udf++; end
    chk("empty", empty, 1);
    checks++; if (udf == 0) begin failures++; $display("FAIL no underflow pulse"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
