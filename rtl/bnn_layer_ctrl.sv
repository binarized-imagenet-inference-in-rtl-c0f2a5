// bnn_layer_ctrl: control unit of one layer.
// Drives all POC PEs of the layer in lockstep. For every window handed over
// by the SIDM it steps through SOC output-channel groups and, inside each,
// SIC input-channel groups (input channels innermost, matching the
// interleaved storage of weights), one (soc, sic) pair per enabled cycle:
// it addresses weight-memory word soc*SIC + sic, tells the layer which
// window slice (sic_o) to latch, and one cycle later, when weights and slice
// are in the pipeline register, marks the PE step as valid, first of an
// output channel or last of it. After issuing the final pair it pulses
// win_release_o so the SIDM may load the next window.
// Timing: one pair per cycle while en_i is high; a window costs SIC*SOC
// cycles. en_i low (output not accepted) freezes the sequence.
// The lockstep control follows the document; the loop order and the
// two-stage pipeline are this design's choices.
module bnn_layer_ctrl #(
  parameter int unsigned SIC = 1,
  parameter int unsigned SOC = 3,
  parameter int unsigned AW  = (SIC * SOC > 1) ? $clog2(SIC * SOC) : 1,
  parameter int unsigned SW  = (SIC > 1) ? $clog2(SIC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en_i,
  input  logic          win_valid_i,
  output logic          win_release_o,
  output logic          issue_o,
  output logic          rd_en_o,
  output logic [AW-1:0] rd_addr_o,
  output logic [SW-1:0] sic_o,
  output logic          valid1_o,
  output logic          first1_o,
  output logic          last1_o
);

  logic [SW-1:0] sic_q;
  logic [$clog2(SOC+1)-1:0] soc_q;
  logic [AW-1:0] addr_q;

  assign issue_o       = en_i && win_valid_i;
  assign rd_en_o       = issue_o;
  assign rd_addr_o     = addr_q;
  assign sic_o         = sic_q;
  assign win_release_o = issue_o && (sic_q == SW'(SIC - 1)) && (soc_q == ($bits(soc_q))'(SOC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sic_q    <= '0;
      soc_q    <= '0;
      addr_q   <= '0;
      valid1_o <= 1'b0;
      first1_o <= 1'b0;
      last1_o  <= 1'b0;
    end else if (en_i) begin
      valid1_o <= issue_o;
      first1_o <= (sic_q == '0);
      last1_o  <= (sic_q == SW'(SIC - 1));
      if (issue_o) begin
        if (win_release_o) begin
          sic_q  <= '0;
          soc_q  <= '0;
          addr_q <= '0;
        end else begin
          addr_q <= addr_q + 1'b1;
          if (sic_q == SW'(SIC - 1)) begin
            sic_q <= '0;
            soc_q <= soc_q + 1'b1;
          end else begin
            sic_q <= sic_q + 1'b1;
          end
        end
      end
    end
  end

endmodule
