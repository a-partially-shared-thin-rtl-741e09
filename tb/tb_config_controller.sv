// tb_config_controller: self-checking test of a configuration controller.
// The configuration cache is modelled here with three configurations at known
// PCs, the scheduler by a model that accepts a word and holds it for one or
// (when deferral is enabled) two cycles. Checks: a miss leaves the core
// running; a hit stalls the core in the same cycle and loads the array
// register file once; the words reach the scheduler in order and exactly
// once; write-back comes only after the scheduler is empty, with the right
// resume PC; and with no deferral a configuration of N words stalls the core
// for exactly N+3 cycles.
module tb_config_controller;
  import rca_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [XLEN-1:0] if_pc, wb_pc, lk_pc;
  logic            if_valid, stall, wb_valid, active, lk_hit, use_valid, rf_load;
  logic            arr_valid, arr_ready, arr_busy;
  logic [6:0]      lk_idx, use_idx, rd_idx;
  logic [3:0]      rd_word;
  chdr_t           lk_hdr;
  cword_t          rd_data, arr_word;

  config_controller dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [%0d] %s", cycles, what); end
  endtask

  // cache model: configurations at 0x100 (3 words), 0x200 (16), 0x300 (1)
  function automatic cword_t word_of(int idx, int w);
    cword_t x = '0;
    x[0].valid = 1; x[0].imm = 32'(idx * 100 + w);
    return x;
  endfunction
  always_comb begin
    lk_hit = 1'b1; lk_idx = 7'd0; lk_hdr = '0;
    unique case (lk_pc)
      32'h100: begin lk_idx = 7'd10; lk_hdr = '{pc: 32'h100, next_pc: 32'h10c, nwords: 5'd3};  end
      32'h200: begin lk_idx = 7'd20; lk_hdr = '{pc: 32'h200, next_pc: 32'h270, nwords: 5'd16}; end
      32'h300: begin lk_idx = 7'd30; lk_hdr = '{pc: 32'h300, next_pc: 32'h304, nwords: 5'd1};  end
      default: lk_hit = 1'b0;
    endcase
    rd_data = word_of(int'(rd_idx), int'(rd_word));
  end

  // scheduler model
  int hold = 0;
  bit defer_en = 0;
  assign arr_ready = (hold <= 1);
  assign arr_busy  = (hold != 0);
  int got [$];
  always @(posedge clk) begin
    if (arr_valid && arr_ready && rst_n) begin
      got.push_back(int'(arr_word[0].imm));
      hold <= (defer_en && $urandom_range(0, 1) == 1) ? 2 : 1;
    end else if (hold > 0) hold <= hold - 1;
  end

  task automatic run(logic [31:0] pc, int idx, int nw, logic [31:0] npc, bit exact);
    int t0, loads = 0, stalls = 0;
    got.delete();
    @(negedge clk);
    if_pc = pc; if_valid = 1;
    #1;
    check(stall && rf_load && use_valid && use_idx == 7'(idx), "hit stalls, loads, marks use");
    t0 = cycles;
    forever begin
      loads += int'(rf_load);
      stalls++;
      check(stall, "core stalled while the configuration runs");
      if (wb_valid) begin
        check(!arr_busy, "write-back only with the scheduler empty");
        break;
      end
      if (cycles > t0 + 100) break;
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    if_pc = npc;
    #1;
    check(!stall, "core runs again");
    check(loads == 1, "one register file copy-in");
    check(got.size() == nw, $sformatf("%0d words delivered, %0d expected", got.size(), nw));
    for (int w = 0; w < got.size(); w++) check(got[w] == idx * 100 + w, "word order");
    if (exact) check(stalls == nw + 3, $sformatf("stall cycles %0d, expected %0d", stalls, nw + 3));
  endtask

  // record resume PCs
  logic [31:0] last_wb;
  always @(posedge clk) if (wb_valid) last_wb <= wb_pc;

  initial begin
    if_pc = 32'h0; if_valid = 0; last_wb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if_pc = 32'h104; if_valid = 1;
    #1;
    check(!stall && !rf_load && !arr_valid, "miss: core keeps running");
    run(32'h100, 10, 3, 32'h10c, 1);
    check(last_wb == 32'h10c, "resume PC 0x10c");
    if_pc = 32'h10c;
    run(32'h200, 20, 16, 32'h270, 1);
    check(last_wb == 32'h270, "resume PC 0x270");
    run(32'h300, 30, 1, 32'h304, 1);
    check(last_wb == 32'h304, "resume PC 0x304");
    defer_en = 1;
    run(32'h200, 20, 16, 32'h270, 0);
    check(last_wb == 32'h270, "resume PC after deferrals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
