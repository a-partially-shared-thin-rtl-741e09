// tb_config_scheduler: self-checking test of the configuration scheduler.
// Directed cases, each checked in the cycle the words sit in the RA stage:
//  A  one core needs five PEs, the others are idle: three own PEs (AT=111),
//     two requests (RT=11) served by idle PEs of the next column, one cycle;
//  B  all cores need five PEs: nothing is idle, each core runs three
//     operations, defers two and finishes them in the next cycle;
//  C  one idle PE, two requesting cores: the one with the higher thread
//     priority gets it, both ways round;
//  D  a memory operation whose grant is withheld: the word waits, its ALU
//     operation runs only once.
// Throughout, a monitor checks that no slot executes twice, that the PE
// named in exec carries that core and slot, and that a word is accepted one
// cycle after it is presented when nothing waits.
module tb_config_scheduler;
  import rca_pkg::*;

  logic clk = 0, rst_n = 0;
  logic    [NCORES-1:0]              in_valid, in_ready, lsu_en, lsu_done, busy, lent, deferred;
  cword_t  [NCORES-1:0]              in_word, cur_word;
  logic    [NCORES-1:0][PRIO_W-1:0]  prio;
  pe_ctl_t [NCORES-1:0][NPE-1:0]     pe_ctl;
  exec_t   [NCORES-1:0][NSLOT-1:0]   exec;
  logic    [NCORES-1:0][2:0]         lsu_slot;
  logic    [NCORES-1:0][NPE-1:0]     at_tab;
  logic    [NCORES-1:0][1:0]         rt_tab;

  config_scheduler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [%0d] %s", cycles, what); end
  endtask

  function automatic cword_t mkword(int nalu, bit mem);
    cword_t w = '0;
    for (int k = 0; k < nalu; k++) begin
      w[k].valid = 1; w[k].op = OP_ADD; w[k].rd = 5'(k + 1); w[k].ra = 5'(k + 10);
    end
    if (mem) begin
      w[nalu].valid = 1; w[nalu].is_mem = 1; w[nalu].rd = 5'd20; w[nalu].ra = 5'd21;
    end
    return w;
  endfunction

  // monitor: slot executed at most once per word, exec agrees with pe_ctl
  logic [NCORES-1:0][NSLOT-1:0] done_mask;
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NCORES; i++) begin
      for (int s = 0; s < NSLOT; s++) if (exec[i][s].go) begin
        check(!done_mask[i][s], $sformatf("core %0d slot %0d executed twice", i, s));
        if (exec[i][s].pe != EXEC_LSU)
          check(pe_ctl[exec[i][s].col][exec[i][s].pe].valid &&
                pe_ctl[exec[i][s].col][exec[i][s].pe].owner == 2'(i) &&
                pe_ctl[exec[i][s].col][exec[i][s].pe].slot == 3'(s), "exec/pe_ctl agree");
      end
    end
  end
  always @(posedge clk) begin
    for (int i = 0; i < NCORES; i++) begin
      if (in_ready[i]) done_mask[i] <= '0;
      else for (int s = 0; s < NSLOT; s++) if (exec[i][s].go) done_mask[i][s] <= 1'b1;
    end
  end

  // present words for one cycle; they are accepted at this edge (CD empty)
  task automatic present(cword_t w0, cword_t w1, cword_t w2, cword_t w3, logic [3:0] v);
    @(negedge clk);
    check(in_ready == 4'hF, "all cores ready before a new case");
    in_word = '{w3, w2, w1, w0};
    in_valid = v;
    @(negedge clk);
    in_valid = '0;
  endtask

  initial begin
    in_valid = '0; in_word = '0; prio = '0; lsu_done = '0; done_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // A: one core with five ALU operations
    present(mkword(5, 0), '0, '0, '0, 4'b0001);
    check(busy == 4'b0001, "A busy");
    check(at_tab[0] == 3'b111 && rt_tab[0] == 2'b11, "A AT/RT");
    check(exec[0][3] == '{go: 1'b1, col: 2'd1, pe: 2'd0}, "A slot 3 lent to column 1 PE 0");
    check(exec[0][4] == '{go: 1'b1, col: 2'd1, pe: 2'd1}, "A slot 4 lent to column 1 PE 1");
    check(lent[0] && !deferred[0] && in_ready[0], "A finished in one cycle");
    @(negedge clk);
    check(busy == 4'b0000, "A drained");

    // B: all four cores with five operations
    present(mkword(5, 0), mkword(5, 0), mkword(5, 0), mkword(5, 0), 4'b1111);
    check(deferred == 4'b1111 && lent == 4'b0000, "B all deferred");
    check(in_ready == 4'b0000, "B words not finished");
    for (int i = 0; i < NCORES; i++)
      check(exec[i][0].go && exec[i][1].go && exec[i][2].go && !exec[i][3].go && !exec[i][4].go,
            $sformatf("B core %0d first three", i));
    @(negedge clk);
    for (int i = 0; i < NCORES; i++) begin
      check(at_tab[i] == 3'b011 && rt_tab[i] == 2'b00, "B leftovers in own column");
      check(exec[i][3] == '{go: 1'b1, col: 2'(i), pe: 2'd0} &&
            exec[i][4] == '{go: 1'b1, col: 2'(i), pe: 2'd1}, "B leftovers executed");
    end
    check(in_ready == 4'b1111, "B finished in the second cycle");
    @(negedge clk);

    // C: one idle PE (column 2, PE 2), cores 0 and 1 both request
    prio = '{2'd0, 2'd0, 2'd2, 2'd1};   // core1 = 2, core0 = 1
    present(mkword(5, 0), mkword(5, 0), mkword(2, 0), mkword(3, 0), 4'b1111);
    check(exec[1][3] == '{go: 1'b1, col: 2'd2, pe: 2'd2}, "C core 1 (higher priority) gets column 2 PE 2");
    check(lent[1] && deferred[1] && !lent[0] && deferred[0], "C lent/deferred flags");
    @(negedge clk);
    @(negedge clk);
    prio = '{2'd0, 2'd0, 2'd1, 2'd3};   // core0 = 3
    present(mkword(5, 0), mkword(5, 0), mkword(2, 0), mkword(3, 0), 4'b1111);
    check(exec[0][3] == '{go: 1'b1, col: 2'd2, pe: 2'd2}, "C core 0 (higher priority) gets column 2 PE 2");
    check(lent[0] && !lent[1], "C flags swapped");
    @(negedge clk);
    @(negedge clk);
    prio = '0;

    // D: memory operation waiting for its grant
    lsu_done = '0;
    present('0, '0, mkword(1, 1), '0, 4'b0100);
    check(lsu_en[2] && lsu_slot[2] == 3'd1, "D load/store unit enabled on slot 1");
    check(exec[2][0].go && !in_ready[2], "D ALU op runs, word waits");
    @(negedge clk);
    check(!exec[2][0].go && !in_ready[2] && busy[2], "D still waiting, ALU op not repeated");
    lsu_done[2] = 1'b1;
    #1;
    check(exec[2][1] == '{go: 1'b1, col: 2'd2, pe: EXEC_LSU} && in_ready[2], "D memory op completes");
    @(negedge clk);
    lsu_done = '0;
    check(busy == '0, "D drained");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
