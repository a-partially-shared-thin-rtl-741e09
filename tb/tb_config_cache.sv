// tb_config_cache: self-checking test of a configuration cache.
// Fills all 128 entries with configurations at distinct PCs and checks every
// lookup, header and word read back, and that an unknown PC misses. Refills
// an existing PC in place. Then exercises the LFRU replacement: an entry never
// used is the first victim; among entries used equally often the one used
// longest ago goes next, and the replacing fill reports an eviction. Finally
// one entry is used until its count saturates, which halves all counts and
// so changes the next victim.
module tb_config_cache;
  import rca_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [XLEN-1:0] lk_pc;
  logic            lk_hit, use_valid, wr_valid, evict;
  logic [6:0]      lk_idx, use_idx, rd_idx;
  logic [3:0]      rd_word;
  chdr_t           lk_hdr, wr_hdr;
  cword_t          rd_data;
  cword_t [NWORDS-1:0] wr_words;

  config_cache dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // word w of the configuration at pc, a fixed scramble of both
  function automatic cword_t word_of(logic [31:0] pc, int w);
    cword_t x;
    logic [31:0] h = pc * 32'h9E37_79B1 + 32'(w) * 32'h85EB_CA6B;
    x = '0;
    for (int k = 0; k < $bits(cword_t); k++) begin
      if (k % 32 == 0) begin
        h = h ^ (h << 13); h = h ^ (h >> 17); h = h ^ (h << 5);
      end
      x[k] = h[k % 32];
    end
    return x;
  endfunction
  function automatic logic [31:0] pc_of(int n);
    return 32'h0040_0000 + 32'(n) * 32'h40;
  endfunction

  task automatic fill(logic [31:0] pc, logic [4:0] nw);
    @(negedge clk);
    wr_valid = 1;
    wr_hdr   = '{pc: pc, next_pc: pc + 32'h20, nwords: nw};
    for (int w = 0; w < NWORDS; w++) wr_words[w] = word_of(pc, w);
    @(negedge clk);
    wr_valid = 0;
  endtask

  task automatic probe(logic [31:0] pc, logic exp_hit, logic use_it);
    @(negedge clk);
    lk_pc = pc;
    #1;
    check(lk_hit == exp_hit, $sformatf("lookup %h hit=%0d", pc, lk_hit));
    if (lk_hit && exp_hit) begin
      check(lk_hdr.pc == pc && lk_hdr.next_pc == pc + 32'h20, "header");
      rd_idx = lk_idx;
      for (int w = 0; w < NWORDS; w += 5) begin
        rd_word = 4'(w);
        #1;
        check(rd_data == word_of(pc, w), $sformatf("word %0d of %h", w, pc));
      end
      if (use_it) begin
        use_valid = 1; use_idx = lk_idx;
        @(negedge clk);
        use_valid = 0;
      end
    end
  endtask

  initial begin
    wr_valid = 0; use_valid = 0; lk_pc = 0; rd_idx = 0; rd_word = 0; use_idx = 0;
    wr_hdr = '0; wr_words = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NCONF; n++) begin
      fill(pc_of(n), 5'(n % 16 + 1));
      check(!evict || n == 0, "no eviction while filling");
    end
    for (int n = 0; n < NCONF; n++) probe(pc_of(n), 1, 0);
    probe(32'h0000_1234, 0, 0);
    // refill an existing PC: stays in place, no eviction
    @(negedge clk);
    wr_valid = 1;
    wr_hdr   = '{pc: pc_of(5), next_pc: pc_of(5) + 32'h20, nwords: 5'd3};
    for (int w = 0; w < NWORDS; w++) wr_words[w] = word_of(pc_of(5), w);
    #1;
    check(!evict, "refill of a present PC evicts nothing");
    @(negedge clk);
    wr_valid = 0;
    // use every entry once except the last one
    for (int n = 0; n < NCONF - 1; n++) probe(pc_of(n), 1, 1);
    // a new configuration replaces the unused entry
    @(negedge clk);
    wr_valid = 1;
    wr_hdr   = '{pc: 32'h0090_0000, next_pc: 32'h0090_0020, nwords: 5'd2};
    for (int w = 0; w < NWORDS; w++) wr_words[w] = word_of(32'h0090_0000, w);
    #1;
    check(evict, "eviction reported");
    @(negedge clk);
    wr_valid = 0;
    probe(pc_of(NCONF - 1), 0, 0);
    probe(32'h0090_0000, 1, 1);    // used once: now as frequent as the others, newest
    // next fill: victim is the entry used longest ago (pc_of(0))
    fill(32'h0091_0000, 5'd1);
    probe(pc_of(0), 0, 0);
    probe(pc_of(1), 1, 0);
    probe(32'h0090_0000, 1, 0);
    probe(32'h0091_0000, 1, 0);
    // an entry used many times survives the next fills
    for (int k = 0; k < 3; k++) probe(pc_of(2), 1, 1);
    fill(32'h0092_0000, 5'd1);   // replaces the unused 0x91 fill
    fill(32'h0093_0000, 5'd1);
    probe(pc_of(2), 1, 0);
    // saturating an entry's count halves every count: the once-used entries
    // drop to zero and the one used longest ago (pc_of(1)) becomes the victim
    // instead of the never-used 0x93 fill
    for (int k = 0; k < 7; k++) probe(pc_of(3), 1, 1);
    fill(32'h0094_0000, 5'd1);
    probe(pc_of(1), 0, 0);
    probe(32'h0093_0000, 1, 0);
    probe(pc_of(3), 1, 0);
    probe(pc_of(2), 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
