// tb_binary_translator: self-checking test of the binary translator.
// Feeds MIPS instruction sequences and checks the configurations produced:
//  1  independent, true-dependent, memory and falsely dependent instructions
//     ended by a branch: every operation's word and slot, the header, and the
//     end reason;
//  2  a chain of 17 dependent additions: the 17th finds no word with room,
//     ends a 16-word configuration and starts the next one, which an
//     unsupported instruction then ends too short to be kept;
//  3  a jump in the PC stream ends a configuration; NOPs use no slot.
// Also checks the translator's rate: one instruction every 4 cycles.
module tb_binary_translator;
  import rca_pkg::*;

  logic clk = 0, rst_n = 0;
  logic        in_valid, in_ready, cfg_valid;
  logic [31:0] in_pc, in_instr;
  chdr_t       cfg_hdr;
  cword_t [NWORDS-1:0] cfg_words;
  logic end_branch, end_unsupported, end_resource, end_discontinuity;

  binary_translator dut (.*);

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

  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] R(int fn, int rs, int rt, int rd, int sh);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction

  // captured configurations and end reasons
  chdr_t  hd [4];
  slot_t  wq [4][NWORDS][NSLOT];
  int     ncfg = 0;
  int n_br = 0, n_un = 0, n_res = 0, n_dis = 0;
  always @(posedge clk) if (rst_n) begin
    if (cfg_valid && ncfg < 4) begin
      hd[ncfg] = cfg_hdr;
      for (int w = 0; w < NWORDS; w++)
        for (int s = 0; s < NSLOT; s++) wq[ncfg][w][s] = cfg_words[w][s];
      ncfg++;
    end
    n_br += int'(end_branch); n_un += int'(end_unsupported);
    n_res += int'(end_resource); n_dis += int'(end_discontinuity);
  end

  int accept_t [$];
  task automatic send(logic [31:0] pc, logic [31:0] ins);
    @(negedge clk);
    in_valid = 1; in_pc = pc; in_instr = ins;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    accept_t.push_back(cycles);
    @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  task automatic drain();
    repeat (12) @(negedge clk);
  endtask

  function automatic bit slot_is(slot_t x, int rd, int ra, logic mem, logic st);
    return x.valid && x.rd == 5'(rd) && x.ra == 5'(ra) && x.is_mem == mem && x.is_store == st;
  endfunction

  initial begin
    in_valid = 0; in_pc = 0; in_instr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- 1
    send(32'h1000, I(9, 0, 1, 5));        // addiu r1, r0, 5
    send(32'h1004, I(9, 0, 2, 7));        // addiu r2, r0, 7
    send(32'h1008, R(6'h21, 1, 2, 3, 0)); // addu  r3, r1, r2
    send(32'h100c, I(6'h23, 3, 4, 0));    // lw    r4, 0(r3)
    send(32'h1010, I(6'h2B, 3, 4, 4));    // sw    r4, 4(r3)
    send(32'h1014, I(9, 0, 1, 9));        // addiu r1, r0, 9  (false dependence on r1)
    send(32'h1018, I(4, 1, 2, 3));        // beq
    drain();
    check(ncfg == 1, "1: one configuration");
    if (ncfg == 1) begin
      check(hd[0].pc == 32'h1000 && hd[0].next_pc == 32'h1018 && hd[0].nwords == 5'd4, "1: header");
      check(slot_is(wq[0][0][0], 1, 0, 0, 0) && wq[0][0][0].b_imm && wq[0][0][0].imm == 5, "1: addiu r1 in word 0");
      check(slot_is(wq[0][0][1], 2, 0, 0, 0), "1: addiu r2 in word 0");
      check(slot_is(wq[0][1][0], 3, 1, 0, 0) && wq[0][1][0].rb == 5'd2 && !wq[0][1][0].b_imm, "1: addu in word 1");
      check(slot_is(wq[0][2][0], 4, 3, 1, 0), "1: lw in word 2");
      check(slot_is(wq[0][3][0], 0, 3, 1, 1) && wq[0][3][0].rb == 5'd4 && wq[0][3][0].imm == 4, "1: sw in word 3");
      check(slot_is(wq[0][2][1], 1, 0, 0, 0) && wq[0][2][1].imm == 9, "1: second addiu r1 after the reader of r1, word 2");
      check(!wq[0][0][2].valid && !wq[0][1][1].valid && !wq[0][4][0].valid, "1: nothing else");
    end
    check(n_br == 1, "1: ended by a branch");
    for (int k = 2; k < accept_t.size(); k++)
      check(accept_t[k] - accept_t[k-1] == 4, "one instruction every 4 cycles");

    // ---- 2
    for (int k = 0; k < 17; k++) send(32'h2000 + 4 * k, I(9, 1, 1, 1));   // addiu r1, r1, 1
    send(32'h2044, R(6'h18, 1, 2, 0, 0));                                   // mult: unsupported
    drain();
    check(ncfg == 2, "2: one more configuration kept");
    if (ncfg == 2) begin
      check(hd[1].pc == 32'h2000 && hd[1].next_pc == 32'h2040 && hd[1].nwords == 5'd16, "2: 16-word header");
      for (int w = 0; w < NWORDS; w++)
        check(slot_is(wq[1][w][0], 1, 1, 0, 0) && !wq[1][w][1].valid, $sformatf("2: chain link in word %0d", w));
    end
    check(n_res == 1 && n_un == 1, "2: ended by resources, then by an unsupported instruction");

    // ---- 3
    send(32'h3000, I(9, 0, 5, 1));
    send(32'h3004, 32'h0000_0000);        // nop
    send(32'h3008, I(9, 0, 6, 2));
    send(32'h5000, I(9, 0, 7, 3));        // not sequential
    send(32'h5004, R(6'h08, 31, 0, 0, 0)); // jr: ends, too short to keep
    drain();
    check(ncfg == 3, "3: configuration ended by the PC jump");
    if (ncfg == 3) begin
      check(hd[2].pc == 32'h3000 && hd[2].next_pc == 32'h300c && hd[2].nwords == 5'd1, "3: header");
      check(slot_is(wq[2][0][0], 5, 0, 0, 0) && slot_is(wq[2][0][1], 6, 0, 0, 0) && !wq[2][0][2].valid,
            "3: two operations, the nop takes no slot");
    end
    check(n_dis == 1 && n_br == 2, "3: end reasons");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
