// tb_vlc_tables -- test coding table and reference encoder shared by the testbenches.
//
// The table is the 24-address, 9-group example code (8-bit maximum codeword):
// codewords are listed per symbol address exactly as bit strings, and the
// group information (length, PCLC_mincode, base address) is listed
// separately, so the reference model never derives one from the other the way
// the hardware does.  Run/level pairs map onto it through a small CBS table:
// largest levels 5,4,3,3,2,2 for runs 0..5 and 0 for runs 6..31 (so every
// pair with run >= 6 is escaped).  Symbol address 11 (codeword 10) is EOB,
// address 12 (codeword 110) is the escape codeword.
package tb_vlc_tables;
  import vlc_pkg::*;

  localparam int NADDR = 24;
  // codeword per symbol address: length 0 means unused location
  localparam int          CW_LEN  [NADDR] = '{8,8,8,8, 6,0,0,6, 3, 4,4, 2, 3, 5,5, 7,7,7,0,7, 8,8,8,8};
  localparam logic [7:0]  CW_BITS [NADDR] = '{8'b00100100, 8'b00100101, 8'b00100110, 8'b00100111,
                                              8'b001100, 8'b0, 8'b0, 8'b001111,
                                              8'b010, 8'b0110, 8'b0111, 8'b10, 8'b110,
                                              8'b11100, 8'b11101,
                                              8'b1111000, 8'b1111001, 8'b1111010, 8'b0, 8'b1111100,
                                              8'b11111010, 8'b11111011, 8'b11111100, 8'b11111101};
  // group information: codeword length, 8-bit PCLC_mincode, base address
  localparam int          NGRP = 9;
  localparam int          G_CL   [NGRP] = '{8, 6, 3, 4, 2, 3, 5, 7, 8};
  localparam logic [7:0]  G_MIN  [NGRP] = '{8'b00100100, 8'b00110000, 8'b01000000, 8'b01100000,
                                            8'b10000000, 8'b11000000, 8'b11100000, 8'b11110000,
                                            8'b11111010};
  localparam int          G_BASE [NGRP] = '{0, 4, 8, 9, 11, 12, 13, 15, 20};

  localparam int EOB_ADDR = 11;
  localparam int ESC_ADDR = 12;
  // largest non-escaped level per run
  localparam int MAXLVL [6] = '{5, 4, 3, 3, 2, 2};
  // symbol address of converted symbol c (1..19) is PAIR_ADDR[c-1]
  localparam int NPAIR = 19;
  localparam int PAIR_ADDR [NPAIR] = '{0,1,2,3,4,7,8,9,10,13,14,15,16,17,19,20,21,22,23};

  function automatic int max_level(int run);
    return (run < 6) ? MAXLVL[run] : 0;
  endfunction

  function automatic int cbs_of(int run);
    int s = 0;
    for (int r = 0; r < run && r < 32; r++) s += max_level(r);
    return s;
  endfunction

  function automatic group_info_t group_word(int g);
    group_info_t gi;
    gi.valid   = 1'b1;
    gi.mincode = {G_MIN[g], 8'h00};
    gi.clm1    = 4'(G_CL[g] - 1);
    gi.base    = 8'(G_BASE[g]);
    return gi;
  endfunction

  // the 12-bit symbol stored at a symbol address: {run, |level|}
  function automatic logic [11:0] symbol_at(int addr);
    for (int c = 1; c <= NPAIR; c++)
      if (PAIR_ADDR[c-1] == addr)
        for (int r = 0; r < 6; r++)
          if (c > cbs_of(r) && c <= cbs_of(r) + max_level(r))
            return {6'(r), 6'(c - cbs_of(r))};
    return 12'hFFF;
  endfunction

  // symbol address of a non-escaped pair
  function automatic int addr_of_pair(int run, int mag);
    return PAIR_ADDR[cbs_of(run) + mag - 1];
  endfunction

  function automatic bit is_escaped(int run, int level);
    int mag = (level < 0) ? -level : level;
    return (level != 0) && (run > 31 || mag > max_level(run));
  endfunction

  // append the reference encoding of one pair to a bit queue (MSB first)
  function automatic void encode_pair(int run, int level, ref bit q[$]);
    int a, mag;
    mag = (level < 0) ? -level : level;
    if (level == 0) a = EOB_ADDR;
    else if (is_escaped(run, level)) a = ESC_ADDR;
    else a = addr_of_pair(run, mag);
    for (int i = CW_LEN[a] - 1; i >= 0; i--) q.push_back(CW_BITS[a][i]);
    if (level == 0) return;
    if (a == ESC_ADDR) begin
      for (int i = 5; i >= 0; i--)  q.push_back(run[i]);
      for (int i = 11; i >= 0; i--) q.push_back(level[i]);
    end else begin
      q.push_back(level < 0);
    end
  endfunction
endpackage
