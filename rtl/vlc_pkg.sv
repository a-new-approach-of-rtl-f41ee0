// vlc_pkg -- shared widths, types and constants of the group-based VLC codec.
//
// The codec encodes and decodes MPEG-style run/level pairs with a fully
// programmable Huffman table.  The sizes below are those of the reference
// configuration: 16-bit codewords, 12-bit symbols, a 256-entry symbol memory
// (8-bit symbol addresses), 32 codeword groups, 6-bit runs, 12-bit levels and
// 18-bit escaped run/level fields.  The table-programming port layout
// (prog_sel_e) is a choice of this design; the original leaves the loading
// interface open.
package vlc_pkg;

  localparam int unsigned CW_W     = 16;  // longest codeword / PCLC_mincode width
  localparam int unsigned CL_W     = 4;   // stored codeword length minus one
  localparam int unsigned ADDR_W   = 8;   // symbol address width (256-entry symbol memory)
  localparam int unsigned SYM_W    = 12;  // decoded symbol width
  localparam int unsigned RUN_W    = 6;   // run width at the codec ports
  localparam int unsigned LEVEL_W  = 12;  // signed level width at the codec ports
  localparam int unsigned SLVL_W   = 6;   // level magnitude held inside a 12-bit symbol
  localparam int unsigned CBS_W    = 8;   // converted symbol / CBS width
  localparam int unsigned CBS_N    = 32;  // CBS-LUT entries (runs 0..31)
  localparam int unsigned ESCRL_W  = RUN_W + LEVEL_W;  // 18-bit escRL field
  localparam int unsigned NGROUPS  = 32;  // group detectors
  localparam int unsigned WORD_W   = 32;  // bit stream buffer word
  localparam int unsigned IO_W     = 16;  // FIFO port width
  localparam int unsigned PTR_W    = 6;   // encCL_acc / decCL_acc width

  // One entry of the group information: {valid, PCLC_mincode, CL-1, base_address}
  typedef struct packed {
    logic              valid;
    logic [CW_W-1:0]   mincode;   // PCLC_mincode, codeword left-justified in 16 bits
    logic [CL_W-1:0]   clm1;      // codeword length minus one
    logic [ADDR_W-1:0] base;      // symbol address of the group's smallest codeword
  } group_info_t;                 // 29 bits

  // Table-programming port: which on-chip table a write goes to.
  typedef enum logic [2:0] {
    PROG_CBS     = 3'd0,  // addr 0..31: CBS[run]; addr 32: end of converted-symbol space
    PROG_SYMADDR = 3'd1,  // addr = converted symbol, data[7:0] = symbol address
    PROG_SYMBOL  = 3'd2,  // addr = symbol address,   data[11:0] = {run, |level|}
    PROG_GROUP   = 3'd3,  // addr = group index,      data[28:0] = group_info_t
    PROG_SPECIAL = 3'd4   // addr 0: escape symbol address, addr 1: EOB symbol address
  } prog_sel_e;

  localparam int unsigned PROG_AW = 9;
  localparam int unsigned PROG_DW = 29;

  // Number of side bits that follow a codeword: sign (1), none for EOB, escRL (18).
  function automatic logic [4:0] extra_bits(input logic esc, input logic eob);
    if (esc)      return 5'd18;
    else if (eob) return 5'd0;
    else          return 5'd1;
  endfunction

endpackage
