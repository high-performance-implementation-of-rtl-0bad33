// skein_pkg: constants and helper functions shared by the Skein hash core.
//
// Skein is built from the tweakable block cipher Threefish (64-bit words,
// MIX = add / rotate / xor, a fixed word permutation after each round, and a
// subkey added every four rounds) chained by Unique Block Iteration (UBI).
// This package holds what every module of the core needs to agree on:
//   * the word and state types (state = NW words of 64 bits, word 0 in bits 63:0),
//   * the key-schedule constant C240,
//   * the per-round MIX rotation amounts R[d mod 8][j] and the word
//     permutation for Threefish-256 (NW=4) and Threefish-512 (NW=8),
//   * the precomputed chaining values (IV) that replace the configuration UBI
//     for Skein-256-256 and Skein-512-512,
//   * the UBI tweak layout (position, type, first and final flags).
// The rotation amounts, permutations, C240 and the IVs are the values of the
// Skein specification, version 1.3; the design itself only refers to them by name.
package skein_pkg;

  typedef logic [63:0] word_t;

  // Number of Threefish rounds and the subkey injection interval.
  localparam int unsigned ROUNDS       = 72;
  localparam int unsigned ROUNDS_PER_SK = 4;
  localparam int unsigned NUM_SUBKEYS  = ROUNDS / ROUNDS_PER_SK + 1;  // 19

  // Key-schedule parity constant: k[NW] = C240 ^ k[0] ^ ... ^ k[NW-1].
  localparam word_t C240 = 64'h1BD1_1BDA_A9FC_1A22;

  // UBI block types carried in tweak bits 125:120 (message and output UBI).
  localparam logic [5:0] T_MSG = 6'd48;
  localparam logic [5:0] T_OUT = 6'd63;

  // MIX rotation amount R[d mod 8][j] for a state of nw words.
  function automatic logic [5:0] rot_amount(int unsigned nw, logic [2:0] d, int unsigned j);
    logic [5:0] r;
    r = '0;
    if (nw == 4) begin
      unique case (d)
        3'd0: r = (j == 0) ? 6'd14 : 6'd16;
        3'd1: r = (j == 0) ? 6'd52 : 6'd57;
        3'd2: r = (j == 0) ? 6'd23 : 6'd40;
        3'd3: r = (j == 0) ? 6'd5  : 6'd37;
        3'd4: r = (j == 0) ? 6'd25 : 6'd33;
        3'd5: r = (j == 0) ? 6'd46 : 6'd12;
        3'd6: r = (j == 0) ? 6'd58 : 6'd22;
        3'd7: r = (j == 0) ? 6'd32 : 6'd32;
        default: r = '0;
      endcase
    end else begin
      logic [3:0][5:0] row;
      unique case (d)
        3'd0: row = {6'd37, 6'd19, 6'd36, 6'd46};
        3'd1: row = {6'd42, 6'd14, 6'd27, 6'd33};
        3'd2: row = {6'd39, 6'd36, 6'd49, 6'd17};
        3'd3: row = {6'd56, 6'd54, 6'd9,  6'd44};
        3'd4: row = {6'd24, 6'd34, 6'd30, 6'd39};
        3'd5: row = {6'd17, 6'd10, 6'd50, 6'd13};
        3'd6: row = {6'd43, 6'd39, 6'd29, 6'd25};
        3'd7: row = {6'd22, 6'd56, 6'd35, 6'd8};
        default: row = '0;
      endcase
      r = row[j[1:0]];
    end
    return r;
  endfunction

  // Word permutation applied after the MIX layer: v_out[i] = f[perm_src(i)].
  function automatic int unsigned perm_src(int unsigned nw, int unsigned i);
    int unsigned p;
    if (nw == 4) begin
      unique case (i)
        0: p = 0; 1: p = 3; 2: p = 2; 3: p = 1;
        default: p = i;
      endcase
    end else begin
      unique case (i)
        0: p = 2; 1: p = 1; 2: p = 4; 3: p = 7;
        4: p = 6; 5: p = 5; 6: p = 0; 7: p = 3;
        default: p = i;
      endcase
    end
    return p;
  endfunction

  // Precomputed chaining value after the configuration UBI (output length = state size).
  function automatic word_t iv_word(int unsigned nw, int unsigned i);
    word_t w;
    if (nw == 4) begin
      unique case (i)
        0: w = 64'hFC9D_A860_D048_B449;
        1: w = 64'h2FCA_6647_9FA7_D833;
        2: w = 64'hB33B_C389_6656_840F;
        3: w = 64'h6A54_E920_FDE8_DA69;
        default: w = '0;
      endcase
    end else begin
      unique case (i)
        0: w = 64'h4903_ADFF_749C_51CE;
        1: w = 64'h0D95_DE39_9746_DF03;
        2: w = 64'h8FD1_9341_27C7_9BCE;
        3: w = 64'h9A25_5629_FF35_2CB1;
        4: w = 64'h5DB6_2599_DF6C_A7B0;
        5: w = 64'hEABE_394C_A9D5_C3F4;
        6: w = 64'h9911_12C7_1A75_B523;
        7: w = 64'hAE18_A40B_660F_CC33;
        default: w = '0;
      endcase
    end
    return w;
  endfunction

  // UBI tweak: bits 95:0 position (bytes processed including this block),
  // 125:120 block type, 126 first block, 127 final block.
  function automatic logic [127:0] make_tweak(logic [95:0] pos, logic [5:0] typ,
                                              logic first, logic final_blk);
    logic [127:0] t;
    t          = '0;
    t[95:0]    = pos;
    t[125:120] = typ;
    t[126]     = first;
    t[127]     = final_blk;
    return t;
  endfunction

  // Rotate a 64-bit word left by r.
  function automatic word_t rotl64(word_t x, logic [5:0] r);
    return (x << r) | (x >> (7'd64 - {1'b0, r}));
  endfunction

endpackage
