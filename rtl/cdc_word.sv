`timescale 1ns / 1fs
// Clock-domain crossing for a slowly changing word.
//
// The source domain registers the word and flips a toggle on every falling
// source clock edge where load is high: words produced on the rising edge
// are taken half a source cycle later, not a full cycle, which keeps the
// delay around the phase-locked loop short.  The destination domain passes the toggle
// through two synchronizing flip-flops and captures the held word one cycle
// after it sees the toggle change, when the word has been stable for at least
// two destination cycles.  The destination clock must be several times faster
// than the rate of loads.  This helper is this design's own; the document
// does not describe how words cross from the reference domain into the
// modulator clock domains.
module cdc_word #(
  parameter int unsigned W = 14
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic         load,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data
);
  logic [W-1:0] hold;
  logic         tog;
  logic [2:0]   sync;

  always_ff @(negedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold <= '0;
      tog  <= 1'b0;
    end else if (load) begin
      hold <= src_data;
      tog  <= ~tog;
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      sync     <= '0;
      dst_data <= '0;
    end else begin
      sync <= {sync[1:0], tog};
      if (sync[2] != sync[1]) dst_data <= hold;
    end
  end
endmodule
