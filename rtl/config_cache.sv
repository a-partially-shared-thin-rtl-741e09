// config_cache: one core's configuration cache.
//
// Holds up to NCONF configurations produced by the binary translator, each a
// header (start PC, resume PC, number of words) and up to NWORDS
// configuration words. It is fully associative and looked up by the PC of
// the first instruction of a configuration: lk_hit/lk_idx/lk_hdr answer
// lk_pc combinationally. Words are read asynchronously by entry and word
// index. A write (wr_valid) stores a whole configuration in one cycle: into
// the entry already holding that PC, else the first free entry, else the
// victim chosen by the LFRU (least frequently, then least recently used)
// policy: every entry keeps a 3-bit saturating use count and a 16-bit stamp
// of its last use; the victim has the smallest count and, among those, the
// oldest stamp. use_valid marks entry use_idx as used (a configuration was
// started from it). When the use count of an entry saturates, all counts are
// halved so that old popularity fades.
// From the document: 128 configurations, LFRU replacement, indexing by the PC
// of the first instruction. Associativity, the exact LFRU bookkeeping and the
// single-cycle write are this design's choices.
module config_cache
  import rca_pkg::*;
#(
  parameter int unsigned ENTRIES = NCONF,
  parameter int unsigned WORDS   = NWORDS,
  localparam int unsigned IW     = $clog2(ENTRIES),
  localparam int unsigned WW     = $clog2(WORDS)
)(
  input  logic                  clk,
  input  logic                  rst_n,
  // lookup
  input  logic [XLEN-1:0]       lk_pc,
  output logic                  lk_hit,
  output logic [IW-1:0]         lk_idx,
  output chdr_t                 lk_hdr,
  // use (replacement bookkeeping)
  input  logic                  use_valid,
  input  logic [IW-1:0]         use_idx,
  // word read
  input  logic [IW-1:0]         rd_idx,
  input  logic [WW-1:0]         rd_word,
  output cword_t                rd_data,
  // fill from the binary translator
  input  logic                  wr_valid,
  input  chdr_t                 wr_hdr,
  input  cword_t [WORDS-1:0]    wr_words,
  output logic                  evict       // a valid configuration was replaced
);

  logic   [ENTRIES-1:0]        valid_q;
  chdr_t  [ENTRIES-1:0]        hdr_q;
  cword_t                      words_q [ENTRIES][WORDS];
  logic   [ENTRIES-1:0][2:0]   freq_q;
  logic   [ENTRIES-1:0][15:0]  stamp_q;
  logic   [15:0]               now_q;

  // lookup
  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (!lk_hit && valid_q[e] && hdr_q[e].pc == lk_pc) begin
        lk_hit = 1'b1;
        lk_idx = IW'(e);
      end
    lk_hdr = hdr_q[lk_idx];
  end

  assign rd_data = words_q[rd_idx][rd_word];

  // placement of a fill
  logic          same_hit, free_hit;
  logic [IW-1:0] same_idx, free_idx, lfru_idx, wr_idx;
  always_comb begin
    same_hit = 1'b0; same_idx = '0;
    free_hit = 1'b0; free_idx = '0;
    lfru_idx = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (!same_hit && valid_q[e] && hdr_q[e].pc == wr_hdr.pc) begin
        same_hit = 1'b1; same_idx = IW'(e);
      end
      if (!free_hit && !valid_q[e]) begin
        free_hit = 1'b1; free_idx = IW'(e);
      end
      if ({freq_q[e], stamp_q[e]} < {freq_q[lfru_idx], stamp_q[lfru_idx]})
        lfru_idx = IW'(e);
    end
    wr_idx = same_hit ? same_idx : free_hit ? free_idx : lfru_idx;
    evict  = wr_valid && !same_hit && !free_hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      freq_q  <= '0;
      stamp_q <= '0;
      now_q   <= '0;
    end else begin
      if (use_valid) begin
        now_q            <= now_q + 16'd1;
        stamp_q[use_idx] <= now_q;
        if (freq_q[use_idx] == 3'd7) begin
          for (int e = 0; e < ENTRIES; e++) freq_q[e] <= freq_q[e] >> 1;
          freq_q[use_idx] <= 3'd4;
        end else begin
          freq_q[use_idx] <= freq_q[use_idx] + 3'd1;
        end
      end
      if (wr_valid) begin
        now_q           <= now_q + 16'd1;
        valid_q[wr_idx] <= 1'b1;
        freq_q[wr_idx]  <= 3'd0;
        stamp_q[wr_idx] <= now_q;
      end
    end
  end

  // configuration storage (memories, no reset needed: valid_q guards them)
  always_ff @(posedge clk)
    if (wr_valid) begin
      hdr_q[wr_idx] <= wr_hdr;
      for (int w = 0; w < WORDS; w++)
        words_q[wr_idx][w] <= wr_words[w];
    end

endmodule
