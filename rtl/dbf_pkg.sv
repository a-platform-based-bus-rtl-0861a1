// dbf_pkg: types, constants and the block-stream schedule shared by the
// macroblock (MB) de-blocking filter.
//
// A MB is handled as three components: luma (4x4 blocks of 4x4 pixels) and
// two chroma components (2x2 blocks each, 4:2:0). Every 4x4 block moves as
// four 32-bit words; a word holds four 8-bit pixels, pixel 0 in bits [7:0].
// Besides the current MB's blocks, a component has N upper-neighbour blocks
// (U) and N left-neighbour blocks (L). The filtering mode (Table I of the
// method: left boundary / upper boundary / current MB filtered or not)
// decides which blocks are moved at all.
//
// The schedule functions below enumerate "slots": every block that could
// take part, in the order the horizontal pass (vertical edges, row by row)
// and the vertical pass (horizontal edges, column by column) stream them.
// A slot is skipped when the mode does not need its block. The block id of
// a slot fixes where the block lives in the local SRAM (4 words per id).
package dbf_pkg;

  localparam int unsigned PIX_W    = 8;
  localparam int unsigned WORD_W   = 32;
  localparam int unsigned NSLOTS   = 40;   // 24 luma + 8 + 8 chroma block slots
  localparam int unsigned NBLOCKS  = 40;   // distinct blocks kept in the SRAM
  localparam int unsigned SRAM_WORDS = NBLOCKS * 4;   // 160
  localparam int unsigned SLOT_W   = 6;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [2:0]        bs_t;     // boundary strength 0..4

  // Filtering needs of one MB (Table I columns Left, Upper, Current).
  typedef struct packed {
    logic left;
    logic upper;
    logic cur;
  } mode_t;

  // Mode number as printed in Table I: 1..7, skip is 0.
  function automatic logic [2:0] mode_number(mode_t m);
    unique case ({m.left, m.upper, m.cur})
      3'b111: return 3'd1;
      3'b011: return 3'd2;
      3'b101: return 3'd3;
      3'b001: return 3'd4;
      3'b110: return 3'd5;
      3'b010: return 3'd6;
      3'b100: return 3'd7;
      default: return 3'd0;
    endcase
  endfunction

  // Filter thresholds and clipping values for one MB. tc0 index 0 is for
  // bS=1, 1 for bS=2, 2 for bS=3.
  typedef struct packed {
    logic [7:0]      alpha_y;
    logic [7:0]      beta_y;
    logic [7:0]      alpha_c;
    logic [7:0]      beta_c;
    logic [2:0][4:0] tc0_y;
    logic [2:0][4:0] tc0_c;
  } params_t;

  // bS of all luma edges of a MB: [edge 0..3][segment 0..3]. Edge 0 is the MB
  // boundary. bs_v holds vertical edges (segment = block row), bs_h holds
  // horizontal edges (segment = block column).
  typedef struct packed {
    logic [3:0][3:0][2:0] bs_v;
    logic [3:0][3:0][2:0] bs_h;
  } bs_table_t;

  typedef enum logic [1:0] {K_UP = 2'd0, K_LEFT = 2'd1, K_CUR = 2'd2} kind_e;

  typedef struct packed {
    logic [1:0] comp;   // 0 luma, 1 Cb, 2 Cr
    kind_e      kind;
    logic [1:0] r;      // block row inside the component (current MB)
    logic [1:0] c;      // block column
  } slot_t;

  function automatic int unsigned comp_n(logic [1:0] comp);
    return (comp == 2'd0) ? 4 : 2;
  endfunction

  // Slot s of the horizontal pass (vert == 0) or the vertical pass (vert == 1).
  // Per component: horizontal pass per row r: L_r, C_r0.., then U0..U(N-1)
  // (the upper blocks are only carried into the SRAM, so they come last);
  // vertical pass L0..L(N-1), then per column c: U_c, C_0c...
  function automatic slot_t slot_info(logic vert, logic [SLOT_W-1:0] s);
    slot_t      o;
    int unsigned base, n, k;
    if (s < 24)      begin o.comp = 2'd0; base = 0;  end
    else if (s < 32) begin o.comp = 2'd1; base = 24; end
    else             begin o.comp = 2'd2; base = 32; end
    n = comp_n(o.comp);
    k = int'(s) - base;
    o.kind = K_CUR;
    o.r = '0;
    o.c = '0;
    if (vert) begin
      if (k < n) begin
        o.kind = K_LEFT;
        o.r    = 2'(k);
      end else begin
        k   = k - n;
        o.c = 2'(k / (n + 1));
        if (k % (n + 1) == 0) o.kind = K_UP;
        else o.r = 2'(k % (n + 1) - 1);
      end
    end else begin
      if (k < n * (n + 1)) begin
        o.r = 2'(k / (n + 1));
        if (k % (n + 1) == 0) o.kind = K_LEFT;
        else o.c = 2'(k % (n + 1) - 1);
      end else begin
        o.kind = K_UP;
        o.c    = 2'(k - n * (n + 1));
      end
    end
    return o;
  endfunction

  // Does the mode need this block transferred?
  function automatic logic slot_present(mode_t m, slot_t t);
    unique case (t.kind)
      K_UP:    return m.upper;
      K_LEFT:  return m.left;
      default: return m.cur || (m.upper && t.r == 0) || (m.left && t.c == 0);
    endcase
  endfunction

  // SRAM block id of a slot (SRAM word address = id*4 + word).
  function automatic logic [5:0] block_id(slot_t t);
    int unsigned base, n;
    base = (t.comp == 2'd0) ? 0 : (t.comp == 2'd1) ? 24 : 32;
    n = comp_n(t.comp);
    unique case (t.kind)
      K_UP:    return 6'(base + t.c);
      K_LEFT:  return 6'(base + n + t.r);
      default: return 6'(base + 2 * n + t.r * n + t.c);
    endcase
  endfunction

  // Edge index (0 = MB boundary) of the edge between this block and the block
  // streamed just before it, and whether the mode filters that edge.
  function automatic logic edge_filtered(logic vert, mode_t m, slot_t t);
    if (t.kind != K_CUR) return 1'b0;
    if (!vert) return (t.c == 0) ? m.left  : m.cur;
    else       return (t.r == 0) ? m.upper : m.cur;
  endfunction

  // bS for word w (pixel row in the horizontal pass, pixel column in the
  // vertical pass) of block t, against the block before it. Chroma edges
  // reuse the bS of the luma edge at the same picture position.
  function automatic bs_t edge_bs(logic vert, bs_table_t b, slot_t t, logic [1:0] w);
    logic [1:0] e, seg;
    logic [2:0] y;
    if (t.comp == 2'd0) begin
      e   = vert ? t.r : t.c;
      seg = vert ? t.c : t.r;
    end else begin
      e   = vert ? {t.r[0], 1'b0} : {t.c[0], 1'b0};
      y   = vert ? {t.c[0], w} : {t.r[0], w};   // chroma sample position 0..7
      seg = y[2:1];                              // luma 4x4 segment covering it
    end
    return vert ? b.bs_h[e][seg] : b.bs_v[e][seg];
  endfunction

  // Number of 32-bit words one MB moves in each direction for a mode.
  function automatic logic [7:0] mode_words(mode_t m);
    int unsigned nw;
    nw = 0;
    for (int s = 0; s < NSLOTS; s++)
      if (slot_present(m, slot_info(1'b0, SLOT_W'(s)))) nw += 4;
    return 8'(nw);
  endfunction

endpackage
