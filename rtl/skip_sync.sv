// skip_sync: brings the skip comparator output into the CLOCK_AUX domain.
//
// COMP_SKIP is produced by a comparator clocked by the DC-DC converter clock,
// which is unrelated to CLOCK_AUX. A two-flop synchroniser removes
// metastability, and a third flop gives the previous sample so that rising
// and falling edges can be seen as one-cycle pulses.
//
// Interface: comp_async in; comp (synchronised level), rise and fall out.
// Timing: rise/fall are high for one CLOCK_AUX cycle, three cycles after the
// comparator edge at most. The two-flop synchroniser is this design's choice:
// the state machines of the reference design react to the asynchronous
// edges directly.
module skip_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic comp_async,
  output logic comp,
  output logic rise,
  output logic fall
);

  logic meta, sync, prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      sync <= 1'b0;
      prev <= 1'b0;
    end else begin
      meta <= comp_async;
      sync <= meta;
      prev <= sync;
    end
  end

  assign comp = sync;
  assign rise = sync & ~prev;
  assign fall = ~sync & prev;

endmodule
