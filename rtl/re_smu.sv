// re_smu: register-exchange survivor memory.
//
// Every state owns a D-bit register holding the decoded input bits of its
// survivor path, newest in bit 0. On each trellis step the register of state s
// is replaced by the register of its chosen predecessor {dec[s], s >> 1},
// shifted up by one, with the input bit that leads into s (the LSB of s)
// appended. No trace-back is needed: the oldest bit of the best state's
// register is the decoded bit D-1 steps back.
//
// Interface: in_valid/dec/best_state come straight from the ACSU (decisions of
// one step and the best state after it). One cycle later out_valid/out_bit give
// bit D-1 of the best state's updated register, i.e. the decoded input of the
// trellis step D-1 steps before the one just processed.
//
// The register-exchange structure is the standard one; reading the output
// from the best-metric state is this design's choice.
module re_smu #(
  parameter int M = 6,
  parameter int D = 42,
  localparam int NS = 2**M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NS-1:0] dec,
  input  logic [M-1:0]  best_state,
  output logic          out_valid,
  output logic          out_bit
);

  logic [D-1:0] reg_q   [NS];
  logic [D-1:0] reg_new [NS];

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      logic [M-1:0] pred;
      pred       = M'(s >> 1) | (M'(dec[s]) << (M - 1));
      reg_new[s] = {reg_q[pred][D-2:0], 1'(s & 1)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) reg_q[s] <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int s = 0; s < NS; s++) reg_q[s] <= reg_new[s];
        out_bit <= reg_new[best_state][D-1];
      end
    end
  end

endmodule
