// Run-time programmable dictionary decompressor (exposed-datapath mode only).
//
// Each of the five move slots has its own dictionary (depths 16, 32, 8, 8, 32
// for slots 0..4). The two top bits of a fetched word give its type:
//   11  uncompressed moves            -> passed to the decoder unchanged
//   01  header, when no fill is due   -> bits [5:0] = number of fill words
//                                        that follow; decoded as a no-op
//   01  fill, while fills are due     -> each slot field is written to that
//                                        slot's dictionary at the next entry
//                                        (entries past a dictionary's depth
//                                        are dropped); decoded as a no-op
//   10  bundle of three compressed instructions of 20 index bits each
//       ([19:0] first, [59:40] last; per instruction idx4[19:15] idx3[14:12]
//       idx2[11:9] idx1[8:4] idx0[3:0])
//   00  long-immediate word           -> passed unchanged
// A bundle is expanded over three cycles, first instruction first; "hold" is
// raised during the first two so that fetch keeps the program counter, as the
// document describes. The output is always an uncompressed-format word.
// Dictionaries are register arrays read combinationally, so the decompressor
// adds no pipeline stage. Slot widths and the header field position are this
// design's choices; the index widths follow from the dictionary depths.
module beaivi_decompressor
  import beaivi_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,      // a TTA word is in decode and may advance
  input  logic          kill,       // abandon a bundle in progress
  input  logic [IW-1:0] word,
  output logic [IW-1:0] out,
  output logic          hold,       // keep this word in decode next cycle
  output logic          ev_header,
  output logic          ev_fill,
  output logic          ev_comp
);
  logic [5:0] fill_cnt, fill_idx;
  logic [1:0] bpos;
  itype_e     ty;
  logic [CIDX_W-1:0] cidx;

  assign ty   = itype_e'(word[63:62]);
  assign cidx = word[CIDX_W*bpos +: CIDX_W];

  assign ev_header = valid && ty == IT_FILL && fill_cnt == 0;
  assign ev_fill   = valid && ty == IT_FILL && fill_cnt != 0;
  assign ev_comp   = valid && ty == IT_COMP;
  assign hold      = ev_comp && bpos != 2'(NCOMP - 1);

  logic [IW-1:0] comp_word;

  for (genvar k = 0; k < NSLOTS; k++) begin : g_dict
    localparam int D  = DICT_D[k];
    localparam int W  = SLOT_W[k];
    localparam int L  = SLOT_LSB[k];
    localparam int XW = IDX_W[k];
    localparam int XL = IDX_LSB[k];
    logic [D-1:0][W-1:0] dict;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dict <= '0;
      else if (ev_fill && fill_idx < 6'(D)) dict[fill_idx[XW-1:0]] <= word[L +: W];
    end

    assign comp_word[L +: W] = dict[cidx[XL +: XW]];
  end
  assign comp_word[63:61] = {IT_UNC, 1'b0};

  always_comb begin
    if (ev_comp)                        out = comp_word;
    else if (ty == IT_FILL || !valid)   out = {IT_UNC, 62'd0} | pack_moves('{default: MOVE_NOP});
    else                                out = word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_cnt <= '0;
      fill_idx <= '0;
      bpos     <= '0;
    end else if (kill) begin
      bpos <= '0;
    end else begin
      if (ev_header) begin
        fill_cnt <= word[5:0];
        fill_idx <= '0;
      end
      if (ev_fill) begin
        fill_cnt <= fill_cnt - 6'd1;
        fill_idx <= fill_idx + 6'd1;
      end
      if (ev_comp) bpos <= hold ? bpos + 2'd1 : 2'd0;
    end
  end
endmodule
