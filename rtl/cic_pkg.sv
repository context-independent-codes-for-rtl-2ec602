// cic_pkg: types and helpers shared by the context-independent-code memory
// controller.
//
// It holds the SDRAM command encoding ({cs_n, ras_n, cas_n, we_n}, the
// standard single-data-rate SDRAM truth table) and a population-count
// function used by the limited-weight code. Nothing here has timing.
package cic_pkg;

  // SDRAM command on {cs_n, ras_n, cas_n, we_n}.
  typedef enum logic [3:0] {
    CMD_MRS   = 4'b0000,  // load mode register
    CMD_REF   = 4'b0001,  // auto refresh
    CMD_PRE   = 4'b0010,  // precharge (A10 = 1: all banks)
    CMD_ACT   = 4'b0011,  // activate row
    CMD_WRITE = 4'b0100,  // write (A10 = 1: auto precharge)
    CMD_READ  = 4'b0101,  // read  (A10 = 1: auto precharge)
    CMD_NOP   = 4'b0111
  } sdram_cmd_e;

  // Number of ones in a word of up to 32 bits.
  function automatic int unsigned popcount(input logic [31:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 32; i++) n += 32'(v[i]);
    return n;
  endfunction

endpackage
