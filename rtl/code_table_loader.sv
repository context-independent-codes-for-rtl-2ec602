// code_table_loader: fills the code tables with a default code after reset
// and then passes table writes from software through.
//
// The encode/decode tables are SRAM, so they hold nothing useful at power-up.
// Right after reset this block walks every symbol s = 0 .. 2**SYM_W-1, one
// per cycle, and writes the fixed limited-weight codeword lwc_enc(s) (with
// CW_W = SYM_W + 1) or s itself (with CW_W = SYM_W, i.e. uncoded). That takes
// 2**SYM_W cycles, well inside the SDRAM power-up wait. cfg_ready is low
// during the walk and external writes are dropped; afterwards ext_* drives
// the tables directly, so software can replace the default with a
// frequency-ranked code. Having a default code at all, and choosing the
// fixed LWC for it, is this design's choice.
module code_table_loader #(
  parameter int unsigned SYM_W = 8,
  parameter int unsigned CW_W  = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ext_we,
  input  logic [SYM_W-1:0] ext_sym,
  input  logic [CW_W-1:0]  ext_cw,
  output logic             cfg_ready,
  output logic             tbl_we,
  output logic [SYM_W-1:0] tbl_sym,
  output logic [CW_W-1:0]  tbl_cw
);
  logic             busy;
  logic [SYM_W-1:0] sym;
  logic [CW_W-1:0]  dflt_cw;

  if (CW_W == SYM_W + 1) begin : g_lwc
    lwc_enc #(.K(SYM_W)) u_lwc (.data(sym), .cw(dflt_cw));
  end else begin : g_plain
    assign dflt_cw = CW_W'(sym);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b1;
      sym  <= '0;
    end else if (busy) begin
      sym <= sym + 1'b1;
      if (sym == '1) busy <= 1'b0;
    end
  end

  assign cfg_ready = !busy;
  assign tbl_we    = busy ? 1'b1    : ext_we;
  assign tbl_sym   = busy ? sym     : ext_sym;
  assign tbl_cw    = busy ? dflt_cw : ext_cw;
endmodule
