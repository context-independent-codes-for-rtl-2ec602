// ci_encoder: context-independent encoder for write data.
//
// Each of the LANES bytes of a system-bus word is looked up in its own code
// table (code_lut, 2**SYM_W entries of CW_W bits); all tables hold the same
// code. The code is a fixed one-to-one map from symbol to codeword, so the
// result depends on the byte alone and never on what went before it: the
// data can be stored encoded in ordinary SDRAM and decoded when read back.
// With CW_W = SYM_W + 1 the tables hold a frequency-ranked limited-weight
// code (most frequent byte -> lightest codeword); with CW_W = SYM_W they hold
// a frequency-based permutation.
//
// Interface: valid/ready in and out, one register stage (the table read).
// A word accepted in cycle t is on out_data from cycle t+1 and stays there
// until out_ready. in_side (address, write enable, strobes) rides alongside
// unchanged. cfg_we writes cfg_cw as the codeword of cfg_sym into every
// lane's table. The table contents are computed off-line from measured
// symbol frequencies; one shared write port and the single pipeline stage are
// choices of this design.
module ci_encoder #(
  parameter int unsigned LANES  = 4,
  parameter int unsigned SYM_W  = 8,
  parameter int unsigned CW_W   = 9,
  parameter int unsigned SIDE_W = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // code table load
  input  logic                    cfg_we,
  input  logic [SYM_W-1:0]        cfg_sym,
  input  logic [CW_W-1:0]         cfg_cw,
  // raw words in
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [LANES*SYM_W-1:0]  in_data,
  input  logic [SIDE_W-1:0]       in_side,
  // encoded words out
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [LANES*CW_W-1:0]   out_data,
  output logic [SIDE_W-1:0]       out_side
);
  logic accept;

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    code_lut #(.AW(SYM_W), .DW(CW_W)) u_lut (
      .clk   (clk),
      .we    (cfg_we),
      .waddr (cfg_sym),
      .wdata (cfg_cw),
      .re    (accept),
      .raddr (in_data[l*SYM_W +: SYM_W]),
      .rdata (out_data[l*CW_W +: CW_W])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_side  <= '0;
    end else begin
      if (accept) begin
        out_valid <= 1'b1;
        out_side  <= in_side;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // A word waiting at the output must not change until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data) && $stable(out_side));
  endproperty
  a_hold: assert property (p_hold);
endmodule
