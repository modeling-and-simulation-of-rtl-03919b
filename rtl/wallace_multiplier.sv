// wallace_multiplier: exact unsigned W x W multiplier built as a Wallace tree (arithmetic unit).
//
// The approximate multipliers feed their two truncated N/2-bit operands to this exact block;
// the published design names a Wallace tree for it. The W*W partial-product bits are placed in 2W
// weight columns. Each reduction layer takes every column's bits three at a time into full
// adders and a leftover pair into a half adder (sum stays in the column, carry moves one column
// up); a single leftover bit passes through. Layers repeat until no column holds more than two
// bits, and a final carry-propagate adder sums the two remaining rows. The bit count of every
// column in every layer depends only on W: a constant function tabulates it once at
// elaboration time, and each bit of each layer becomes one fixed full-adder, half-adder or
// wire (four layers for W = 8; W >= 2). Combinational.
module wallace_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int PW     = 2 * W;
  localparam int ROWS   = W;                 // a column never holds more than W bits
  localparam int LAYERS = 10;                // enough for W up to 64
  localparam int HTW    = (LAYERS + 1) * PW * 8;

  // bits kept in a column from a layer of height h: one per group of three, plus the remainder
  function automatic int n_stay(input int h);
    return h / 3 + ((h % 3 != 0) ? 1 : 0);
  endfunction
  // carries a column of height h sends one column up: one per full or half adder
  function automatic int n_carry(input int h);
    return h / 3 + ((h % 3 == 2) ? 1 : 0);
  endfunction
  // table of column heights: 8 bits for column c entering layer l at [(l*PW+c)*8 +: 8]
  function automatic logic [HTW-1:0] height_table();
    logic [HTW-1:0] t;
    int h  [PW];
    int nh [PW];
    int mx;
    t = '0;
    for (int i = 0; i < PW; i++) h[i] = (i <= PW - 2) ? (((i < W) ? i : PW - 2 - i) + 1) : 0;
    for (int k = 0; k <= LAYERS; k++) begin
      for (int i = 0; i < PW; i++) t[(k*PW+i)*8 +: 8] = 8'(h[i]);
      mx = 0;
      for (int i = 0; i < PW; i++) if (h[i] > mx) mx = h[i];
      if (mx > 2) begin
        for (int i = 0; i < PW; i++) nh[i] = n_stay(h[i]) + ((i > 0) ? n_carry(h[i-1]) : 0);
        for (int i = 0; i < PW; i++) h[i] = nh[i];
      end
    end
    return t;
  endfunction

  localparam logic [HTW-1:0] HT = height_table();

  // Layer 0: partial product a[i]&b[c-i] in row r of column c, r counting up from the
  // smallest valid i.
  logic [ROWS-1:0] pp [PW];
  for (genvar c = 0; c < PW; c++) begin : g_pp
    localparam int I0 = (c < W) ? 0 : c - W + 1;
    localparam int H0 = int'(HT[c*8 +: 8]);
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      if (r < H0) begin : g_bit
        assign pp[c][r] = a[I0 + r] & b[c - I0 - r];
      end else begin : g_zero
        assign pp[c][r] = 1'b0;
      end
    end
  end

  // number of layers that reduce (four for W = 8)
  function automatic int active_layers();
    int n = 0;
    for (int k = 0; k < LAYERS; k++)
      if (HT[(k+1)*PW*8 +: PW*8] != HT[k*PW*8 +: PW*8]) n = k + 1;
    return n;
  endfunction
  localparam int NL = active_layers();

  for (genvar l = 0; l < NL; l++) begin : g_layer
    logic [ROWS-1:0] src [PW];   // bits entering this layer
    logic [ROWS-1:0] col [PW];   // bits leaving it
    if (l == 0) begin : g_first
      assign src = pp;
    end else begin : g_next
      assign src = g_layer[l-1].col;
    end
    for (genvar c = 0; c < PW; c++) begin : g_col
      localparam int H  = int'(HT[(l*PW+c)*8 +: 8]);
      localparam int HL = (c > 0) ? int'(HT[(l*PW+c-1)*8 +: 8]) : 0;
      localparam int NS = n_stay(H);
      localparam int NC = (c > 0) ? n_carry(HL) : 0;
      localparam int CB = (c > 0) ? c - 1 : 0;   // column below
      logic [ROWS-1:0] nxt;
      always_comb begin
        nxt = '0;
        for (int r = 0; r < ROWS; r++) begin
          if (r < NS) begin
            // group r of this column: full-adder sum, half-adder sum or pass-through
            if (H - 3 * r >= 3)
              nxt[r] = src[c][3*r] ^ src[c][3*r+1] ^ src[c][3*r+2];
            else if (H - 3 * r == 2)
              nxt[r] = src[c][3*r] ^ src[c][3*r+1];
            else
              nxt[r] = src[c][3*r];
          end else if (r < NS + NC) begin
            // carry of group r-NS of the column below
            if (HL - 3 * (r - NS) >= 3)
              nxt[r] = (src[CB][3*(r-NS)] & src[CB][3*(r-NS)+1]) |
                       (src[CB][3*(r-NS)+2] & (src[CB][3*(r-NS)] ^ src[CB][3*(r-NS)+1]));
            else
              nxt[r] = src[CB][3*(r-NS)] & src[CB][3*(r-NS)+1];
          end
        end
      end
      assign col[c] = nxt;
    end
  end

  // Final carry-propagate adder on the two remaining rows; the product fits in 2W bits.
  logic [PW-1:0] row0, row1;
  for (genvar c = 0; c < PW; c++) begin : g_final
    assign row0[c] = g_layer[NL-1].col[c][0];
    assign row1[c] = g_layer[NL-1].col[c][1];
  end
  assign p = row0 + row1;
endmodule
