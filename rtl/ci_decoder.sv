// ci_decoder: context-independent decoder for read data.
//
// Each received codeword of CW_W bits is turned back into its SYM_W-bit
// symbol by a 2**SYM_W-entry table (code_lut), one table per lane, all
// holding the same inverse code. To keep the table at 256 entries for 9-bit
// codewords, the codeword is first folded to SYM_W bits with the fixed
// limited-weight-code inverse (lwc_dec: invert the low bits when the top bit
// is set). That fold is one-to-one on all codewords of weight <= SYM_W/2 and
// on codes whose top bit is always 0, which covers the limited-weight and the
// plain-permutation codes. With CW_W = SYM_W the fold is skipped.
//
// Interface: in_valid/in_data from the SDRAM side, out_valid/out_data to the
// system bus exactly one cycle later; there is no back-pressure. cfg_we
// writes the pair (cfg_sym, cfg_cw) into every lane's table at the folded
// index of cfg_cw, so the same write that loads the encoder loads the
// decoder. The one-cycle latency is the penalty the design budgets for
// decoding; the fold is this design's own choice.
module ci_decoder #(
  parameter int unsigned LANES = 4,
  parameter int unsigned SYM_W = 8,
  parameter int unsigned CW_W  = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [SYM_W-1:0]        cfg_sym,
  input  logic [CW_W-1:0]         cfg_cw,
  input  logic                    in_valid,
  input  logic [LANES*CW_W-1:0]   in_data,
  output logic                    out_valid,
  output logic [LANES*SYM_W-1:0]  out_data
);
  initial assert (CW_W == SYM_W || CW_W == SYM_W + 1)
    else $error("ci_decoder: CW_W must be SYM_W or SYM_W+1");

  logic [SYM_W-1:0] cfg_idx;

  if (CW_W == SYM_W + 1) begin : g_fold
    lwc_dec #(.K(SYM_W)) u_cfg_fold (.cw(cfg_cw), .data(cfg_idx));
  end else begin : g_nofold
    assign cfg_idx = cfg_cw[SYM_W-1:0];
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [SYM_W-1:0] idx;
    if (CW_W == SYM_W + 1) begin : g_fold
      lwc_dec #(.K(SYM_W)) u_fold (.cw(in_data[l*CW_W +: CW_W]), .data(idx));
    end else begin : g_nofold
      assign idx = in_data[l*CW_W +: SYM_W];
    end
    code_lut #(.AW(SYM_W), .DW(SYM_W)) u_lut (
      .clk   (clk),
      .we    (cfg_we),
      .waddr (cfg_idx),
      .wdata (cfg_sym),
      .re    (in_valid),
      .raddr (idx),
      .rdata (out_data[l*SYM_W +: SYM_W])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
