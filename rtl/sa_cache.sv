// sa_cache: parameterised cache lookup array (direct-mapped or set-associative).
//
// A 32-bit byte address splits, from the top, into a tag, an index of
// INDEX_BITS bits that selects a set, a block offset of OFF_BITS bits that
// selects a 32-bit word within a block of 2**OFF_BITS words, and a 2-bit
// byte offset. Each of the WAYS ways holds, per set, a valid bit, the tag
// and the block. A lookup reads the set in every way at once; a way hits
// when it is valid and its tag matches; hit is the OR of the way hits and
// the word is taken from the hitting way and selected by the block offset.
// Lookup is combinational. A block is written at the rising clock edge
// through the fill port into the ways chosen by fill_way (one-hot), which
// also sets the valid bit. Reset clears every valid bit.
//
// Configurations the lecture draws (all with 32-bit words):
//   WAYS=1 INDEX_BITS=10 OFF_BITS=0  direct-mapped, 1K one-word blocks
//                                    (20-bit tag; the default)
//   WAYS=1 INDEX_BITS=8  OFF_BITS=2  direct-mapped, 256 four-word blocks
//   WAYS=2 INDEX_BITS=8  OFF_BITS=0  2-way, 256 sets, 22-bit tag
//   WAYS=4 INDEX_BITS=8  OFF_BITS=0  4-way, 256 sets, 22-bit tag
// The field widths, valid/tag/data layout, comparators, AND/OR hit logic
// and the way select are the lecture's. The fill port and the choice of the
// way to replace (left to the user through fill_way) are this design's own.
module sa_cache #(
  parameter int unsigned WAYS       = 1,
  parameter int unsigned INDEX_BITS = 10,
  parameter int unsigned OFF_BITS   = 0
) (
  input  logic                          clk,
  input  logic                          rst,
  // lookup
  input  logic [31:0]                   adr,
  output logic                          hit,
  output logic [WAYS-1:0]               hit_way,    // one-hot hitting way
  output logic [31:0]                   data,
  // fill
  input  logic                          fill_we,
  input  logic [WAYS-1:0]               fill_way,   // one-hot way to write
  input  logic [31:0]                   fill_adr,   // any address in the block
  input  logic [32*(2**OFF_BITS)-1:0]   fill_block  // word i at bits [32i+31:32i]
);

  localparam int unsigned SETS     = 2 ** INDEX_BITS;
  localparam int unsigned WPB      = 2 ** OFF_BITS;
  localparam int unsigned TAG_BITS = 30 - INDEX_BITS - OFF_BITS;
  localparam int unsigned TAG_LSB  = 2 + OFF_BITS + INDEX_BITS;
  localparam int unsigned IDX_LSB  = 2 + OFF_BITS;

  typedef logic [TAG_BITS-1:0]   tag_t;
  typedef logic [INDEX_BITS-1:0] idx_t;
  typedef logic [32*WPB-1:0]     blk_t;

  idx_t        idx, fidx;
  tag_t        tag, ftag;
  logic [31:0] way_word [WAYS];

  assign idx  = adr[IDX_LSB +: INDEX_BITS];
  assign tag  = adr[TAG_LSB +: TAG_BITS];
  assign fidx = fill_adr[IDX_LSB +: INDEX_BITS];
  assign ftag = fill_adr[TAG_LSB +: TAG_BITS];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic valid  [SETS];   // flip-flops, cleared by reset
    tag_t tags   [SETS];   // RAM
    blk_t blocks [SETS];   // RAM
    logic wr;
    blk_t blk;

    assign wr = fill_we && fill_way[w] && !rst;

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int s = 0; s < SETS; s++) valid[s] <= 1'b0;
      end else if (wr) begin
        valid[fidx] <= 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (wr) begin
        tags[fidx]   <= ftag;
        blocks[fidx] <= fill_block;
      end
    end

    // tag compare AND valid
    assign hit_way[w] = valid[idx] && (tags[idx] == tag);
    assign blk        = blocks[idx];

    // block offset: word select inside the block
    if (OFF_BITS == 0) begin : g_one
      assign way_word[w] = blk;
    end else begin : g_sel
      logic [OFF_BITS-1:0] woff;
      assign woff = adr[2 +: OFF_BITS];
      always_comb begin
        way_word[w] = '0;
        for (int i = 0; i < WPB; i++)
          if (woff == i[OFF_BITS-1:0]) way_word[w] = blk[32*i +: 32];
      end
    end
  end

  // OR of the way hits; the hitting way's word
  always_comb begin
    hit  = |hit_way;
    data = '0;
    for (int w = 0; w < WAYS; w++)
      data |= {32{hit_way[w]}} & way_word[w];
  end

  // a block is never held by two ways of one set
  always_ff @(posedge clk)
    if (!rst) assert ($onehot0(hit_way)) else $error("sa_cache: several ways hit");

endmodule
