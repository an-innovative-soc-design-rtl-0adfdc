// tb_bus_arbiter: ownership of the on-chip bus between CPU and DMA.
//
// Random request patterns are compared with the arbitration rule worked out
// in the testbench: next cycle the DMA owns the bus if it requests, unless
// the CPU owns it and holds a locked transfer; otherwise the CPU owns it.
// Exactly one master must own the bus, and handovers are counted.
module tb_bus_arbiter;
  logic clk = 0, rst_n = 0;
  logic cpu_req = 0, cpu_lock = 0, dma_req = 0;
  logic cpu_gnt, dma_gnt, handover;
  int checks = 0, failures = 0, handovers = 0, lock_holds = 0;

  bus_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic exp_dma;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (!cpu_gnt || dma_gnt) begin failures++; $display("FAIL reset owner"); end
    exp_dma = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      cpu_req = 1'($urandom); cpu_lock = ($urandom % 4) == 0; dma_req = ($urandom % 3) != 0;
      if (!exp_dma && cpu_req && cpu_lock && dma_req) lock_holds++;
      exp_dma = dma_req && !(!exp_dma && cpu_req && cpu_lock);
      @(negedge clk);
      checks += 2;
      if (dma_gnt != exp_dma) begin failures++; $display("FAIL cycle %0d dma_gnt %0d", i, dma_gnt); end
      if (cpu_gnt == dma_gnt) begin failures++; $display("FAIL two owners"); end
      if (handover) handovers++;
      // hold the inputs one more cycle so the next rule starts from this owner
      cpu_req = 0; dma_req = exp_dma; cpu_lock = 0;
    end
    checks += 2;
    if (handovers == 0)  begin failures++; $display("FAIL no handover"); end
    if (lock_holds == 0) begin failures++; $display("FAIL lock never held"); end
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
