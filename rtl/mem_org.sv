// mem_org: main memory and one-word-wide bus that refill a cache block.
//
// On req (accepted when idle) the block that holds req_adr is read and its
// words are returned over a 32-bit bus, lowest word first, one word per
// rvalid pulse; rlast marks the final word. With the default timing a miss
// costs, counted from the cycle the address is sent to the cycle the last
// word arrives:
//   1 cycle   to send the address,
//   DRAM time ORG_ONE_WORD:    T_CYCLE per word, one word after the other
//             ORG_PAGE_MODE:   T_CYCLE for the first word, T_PAGE for each
//                              further word of the open row
//             ORG_INTERLEAVED: T_CYCLE for all banks in parallel, then one
//                              cycle per further word on the bus
//   1 cycle   to return the last word.
// That is 27 cycles for a one-word block and, for four-word blocks, 102
// (one-word-wide), 51 (page mode) and 30 (interleaved, four banks). The
// return of a word overlaps the DRAM access of the next one.
//
// The memory is built from BANKS arrays: one for the first two
// organizations, one per word of the block for the interleaved one, word
// address a living in bank a mod BANKS at row a / BANKS. A separate load
// port writes one word per clock, without the DRAM timing, to fill the
// memory before use.
//
// The organizations and their cycle counts are the lecture's; the
// handshake (req/busy, rvalid/rword/rlast), the load port, the memory size
// and the registered bus output are this design's own.
module mem_org
  import mem_pkg::*;
#(
  parameter mem_org_e    ORG         = ORG_ONE_WORD,
  parameter int unsigned BLOCK_WORDS = 4,     // words per cache block
  parameter int unsigned WORDS       = 4096,  // memory size in words
  parameter int unsigned T_CYCLE     = 25,    // DRAM cycle time
  parameter int unsigned T_PAGE      = 8      // page-mode access time
) (
  input  logic                     clk,
  input  logic                     rst,
  // block read
  input  logic                     req,
  input  logic [31:0]              req_adr,   // byte address inside the block
  output logic                     busy,
  output logic                     rvalid,
  output logic [$clog2(BLOCK_WORDS > 1 ? BLOCK_WORDS : 2)-1:0] rword,
  output logic                     rlast,
  output logic [31:0]              rdata,
  // memory load port (word address)
  input  logic                     wr_we,
  input  logic [$clog2(WORDS)-1:0] wr_adr,
  input  logic [31:0]              wr_data
);

  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned OW    = $clog2(BLOCK_WORDS);           // word offset bits
  localparam int unsigned KW    = $clog2(BLOCK_WORDS > 1 ? BLOCK_WORDS : 2);
  localparam int unsigned BANKS = (ORG == ORG_INTERLEAVED) ? BLOCK_WORDS : 1;
  localparam int unsigned BW    = $clog2(BANKS);
  localparam int unsigned RW    = AW - BW;
  localparam int unsigned ROWS  = WORDS / BANKS;
  localparam int unsigned TW    = $clog2(T_CYCLE + 1);
  localparam logic [KW-1:0] KLAST = KW'(BLOCK_WORDS - 1);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_ACCESS, S_XFER} state_e;

  state_e          state;
  logic [AW-1:0]   base;      // word address of the block's first word
  logic [KW-1:0]   k;         // word being read or returned
  logic [TW-1:0]   timer;     // DRAM cycles left for the current access
  logic [31:0]     bank_q [BANKS];
  logic [31:0]     bank_rd [BANKS];
  logic [RW-1:0]   rd_row, wr_row;

  // ---------------- DRAM banks ----------------
  assign wr_row = RW'(wr_adr >> BW);
  assign rd_row = (ORG == ORG_INTERLEAVED) ? RW'(base >> BW) : RW'(base + AW'(k));

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [31:0] m [ROWS];
    logic        sel;
    assign sel = (BANKS == 1) || ((int'(wr_adr) % BANKS) == b);
    always_ff @(posedge clk)
      if (wr_we && sel) m[wr_row] <= wr_data;
    assign bank_rd[b] = m[rd_row];
  end

  // ---------------- controller ----------------
  logic [AW-1:0] req_word;
  assign req_word = AW'(req_adr >> 2);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      base   <= '0;
      k      <= '0;
      timer  <= '0;
      rvalid <= 1'b0;
      rlast  <= 1'b0;
      rword  <= '0;
      rdata  <= '0;
      for (int b = 0; b < BANKS; b++) bank_q[b] <= '0;
    end else begin
      rvalid <= 1'b0;
      rlast  <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          base  <= (req_word >> OW) << OW;
          state <= S_ADDR;
        end
        S_ADDR: begin                      // address on the bus
          k     <= '0;
          timer <= TW'(T_CYCLE);
          state <= S_ACCESS;
        end
        S_ACCESS: begin
          if (timer > TW'(1)) begin
            timer <= timer - TW'(1);
          end else begin                   // last cycle of the DRAM access
            rvalid <= 1'b1;
            rword  <= k;
            rlast  <= (k == KLAST);
            if (ORG == ORG_INTERLEAVED) begin
              for (int b = 0; b < BANKS; b++) bank_q[b] <= bank_rd[b];
              rdata <= bank_rd[0];
              k     <= k + KW'(1);
              state <= (k == KLAST) ? S_IDLE : S_XFER;
            end else begin
              rdata <= bank_rd[0];
              if (k == KLAST) begin
                state <= S_IDLE;
              end else begin
                k     <= k + KW'(1);
                timer <= (ORG == ORG_PAGE_MODE) ? TW'(T_PAGE) : TW'(T_CYCLE);
              end
            end
          end
        end
        S_XFER: begin                      // interleaved: one word per cycle
          rvalid <= 1'b1;
          rword  <= k;
          rlast  <= (k == KLAST);
          for (int b = 0; b < BANKS; b++)
            if (k == KW'(b)) rdata <= bank_q[b];
          k      <= k + KW'(1);
          if (k == KLAST) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
