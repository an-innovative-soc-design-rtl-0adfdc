// bus_arbiter: gives the on-chip bus to the CPU or to the DMA.
//
// Two masters share the bus. The DMA has priority: it only asks for the bus
// inside the DMA timeslot of its traffic descriptor, which already bounds
// its share and guarantees the CPU its off-bus interval. When no master
// requests, the bus stays parked on the CPU. A CPU transfer that must not
// be split (cpu_lock, as for a locked or burst access) keeps the bus until
// it ends; the DMA waits. Grants are registered: a
// request is granted from the next cycle, and exactly one master holds the
// grant at any time. 'handover' pulses when ownership changes. The two
// masters follow the document; fixed DMA priority and CPU parking are this
// design's choices.
module bus_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic cpu_req,
  input  logic cpu_lock,
  input  logic dma_req,
  output logic cpu_gnt,
  output logic dma_gnt,
  output logic handover
);
  logic dma_next;

  // DMA first unless the CPU holds a locked transfer; else CPU (also idle)
  assign dma_next = dma_req && !(cpu_gnt && cpu_req && cpu_lock);
  assign cpu_gnt  = !dma_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_gnt  <= 1'b0;
      handover <= 1'b0;
    end else begin
      dma_gnt  <= dma_next;
      handover <= dma_next != dma_gnt;
    end
  end

  a_one_owner: assert property (@(posedge clk) cpu_gnt != dma_gnt);
  a_cpu_served: assert property (@(posedge clk) cpu_req && !dma_req |=> cpu_gnt);
  a_lock_kept:  assert property (@(posedge clk) cpu_gnt && cpu_req && cpu_lock |=> cpu_gnt);

endmodule
