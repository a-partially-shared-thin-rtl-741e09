// tb_rca_top: end-to-end test of the four-core reconfigurable system at its
// default sizes.
// Each core is modelled here by a simple instruction-set model (one
// instruction per cycle, no branch delay slot) that runs a small MIPS
// program: two loops with many independent operations (one with loads and
// stores), a loop with a long chain of dependent additions, and a short loop
// with an unsupported instruction in it. The model hands every executed
// instruction to its binary translator (waiting while the translator is
// busy), offers its PC to the configuration controller, stops while the
// controller stalls it, and takes the register file and PC back at
// write-back. Memory grants to the load/store units are withheld at random.
// A second, plain run of the same programs on the model alone gives the
// expected registers and memory. The test also counts and requires each
// mechanism at least once: configurations saved and run, PE lending,
// deferral, memory stalls, and configurations ended by a branch, by an
// unsupported instruction, by lack of resources and by a PC jump.
module tb_rca_top;
  import rca_pkg::*;

  logic clk = 0, rst_n = 0;
  logic   [NCORES-1:0]                     bt_valid, bt_ready, if_valid, stall, wb_valid;
  logic   [NCORES-1:0][XLEN-1:0]           bt_pc, if_pc, wb_pc;
  logic   [NCORES-1:0][31:0]               bt_instr;
  logic   [NCORES-1:0][NREG-1:0][XLEN-1:0] proc_rf, arr_rf;
  logic   [NCORES-1:0][PRIO_W-1:0]         prio;
  logic   [NCORES-1:0]                     mem_req, mem_we, mem_gnt;
  logic   [NCORES-1:0][XLEN-1:0]           mem_addr, mem_wdata, mem_rdata;
  logic   [NCORES-1:0]                     st_lent, st_deferred, st_cfg_saved, st_evict;
  logic   [NCORES-1:0][3:0]                st_end;

  rca_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 200000);
    failures++;
    for (int i = 0; i < NCORES; i++)
      $display("watchdog expired: core %0d pc %h done %0d stall %0d", i, st_pc[0][i], done[i], stall[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ programs
  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] R(int fn, int rs, int rt, int rd, int sh);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction

  localparam int PLEN = 64;
  logic [31:0] imem [NCORES][PLEN];
  function automatic logic [31:0] code_base(int i);
    return 32'h0001_0000 * (i + 1);
  endfunction

  task automatic build_programs();
    int n;
    for (int i = 0; i < NCORES; i++) for (int k = 0; k < PLEN; k++) imem[i][k] = 32'h0;
    // cores 0 and 1: many independent operations; core 0 also loads and stores
    for (int i = 0; i < 2; i++) begin
      n = 0;
      imem[i][n++] = I(6'h0F, 0, 20, 8 + i);          // lui   r20, data region
      imem[i][n++] = I(9, 0, 10, 40);                 // addiu r10, r0, 40 (iterations)
      imem[i][n++] = I(9, 0, 11, 3 + i);
      imem[i][n++] = I(9, 0, 12, 5);
      imem[i][n++] = I(6'h0D, 0, 13, 16'h0F0F);       // ori
      imem[i][n++] = I(9, 0, 14, -7);
      // loop body starts at index 6
      if (i == 0) begin
        imem[i][n++] = I(6'h23, 20, 1, 0);            // lw r1, 0(r20)
        imem[i][n++] = I(6'h23, 20, 2, 4);            // lw r2, 4(r20)
      end else begin
        imem[i][n++] = I(9, 11, 1, 100);
        imem[i][n++] = I(9, 12, 2, -100);
      end
      imem[i][n++] = R(6'h21, 11, 12, 3, 0);          // addu r3, r11, r12
      imem[i][n++] = R(6'h23, 12, 11, 4, 0);          // subu r4, r12, r11
      imem[i][n++] = R(6'h26, 11, 13, 5, 0);          // xor  r5, r11, r13
      imem[i][n++] = R(6'h25, 12, 13, 6, 0);          // or   r6, r12, r13
      imem[i][n++] = R(6'h24, 11, 14, 7, 0);          // and  r7, r11, r14
      imem[i][n++] = R(6'h00, 0, 12, 8, 3);           // sll  r8, r12, 3
      imem[i][n++] = R(6'h21, 1, 2, 9, 0);            // addu r9, r1, r2
      imem[i][n++] = R(6'h2A, 14, 11, 15, 0);         // slt  r15, r14, r11
      imem[i][n++] = R(6'h03, 0, 14, 16, 2);          // sra  r16, r14, 2
      imem[i][n++] = I(6'h0A, 11, 17, 50);            // slti r17, r11, 50
      if (i == 0) imem[i][n++] = I(6'h2B, 20, 9, 8);  // sw r9, 8(r20)
      imem[i][n++] = R(6'h21, 3, 4, 11, 0);           // addu r11, r3, r4
      imem[i][n++] = R(6'h26, 5, 6, 12, 0);           // xor  r12, r5, r6
      imem[i][n++] = R(6'h21, 7, 8, 14, 0);           // addu r14, r7, r8
      imem[i][n++] = I(9, 20, 20, 16);                // addiu r20, r20, 16
      imem[i][n++] = I(9, 10, 10, -1);                // addiu r10, r10, -1
      imem[i][n] = I(5, 10, 0, 6 - (n + 1)); n++;     // bne r10, r0, body
      imem[i][n] = I(4, 0, 0, -1);                    // halt: beq r0, r0, self
    end
    // core 2: a chain of 18 dependent additions, with 8 independent updates
    n = 0;
    imem[2][n++] = I(9, 0, 10, 20);
    imem[2][n++] = I(9, 0, 1, 1);
    for (int k = 0; k < 18; k++) begin
      imem[2][n++] = I(9, 1, 1, k + 1);                           // addiu r1, r1, k+1
      if (k < 2) for (int q = 0; q < 4; q++)
        imem[2][n++] = I(9, 11 + 4 * k + q, 11 + 4 * k + q, q + 1); // independent updates
    end
    imem[2][n++] = R(6'h21, 1, 1, 2, 0);
    imem[2][n++] = I(9, 10, 10, -1);
    imem[2][n] = I(5, 10, 0, 2 - (n + 1)); n++;   // bne r10, r0, chain
    imem[2][n] = I(4, 0, 0, -1);
    // core 3: short loop with an unsupported instruction (mult) inside
    n = 0;
    imem[3][n++] = I(9, 0, 10, 30);
    imem[3][n++] = I(9, 0, 1, 9);
    imem[3][n++] = R(6'h21, 2, 1, 2, 0);              // addu r2, r2, r1
    imem[3][n++] = I(9, 2, 6, 1);                     // addiu r6, r2, 1
    imem[3][n++] = R(6'h04, 1, 6, 7, 0);              // sllv r7, r6, r1
    imem[3][n++] = R(6'h18, 1, 2, 0, 0);              // mult (unsupported)
    imem[3][n++] = R(6'h21, 3, 2, 3, 0);              // addu r3, r3, r2
    imem[3][n++] = I(9, 3, 4, 1);                     // addiu r4, r3, 1
    imem[3][n++] = R(6'h26, 4, 3, 5, 0);              // xor r5, r4, r3
    for (int q = 0; q < 5; q++)
      imem[3][n++] = I(9, 11 + q, 11 + q, q + 2);     // independent updates
    imem[3][n++] = I(9, 10, 10, -1);
    imem[3][n] = I(5, 10, 0, 2 - (n + 1)); n++;
    imem[3][n] = I(4, 0, 0, -1);
  endtask

  // ------------------------------------------------------------ memory
  logic [31:0] mem  [logic [29:0]];
  logic [31:0] rmem [logic [29:0]];

  // ------------------------------------------------------------ instruction-set model
  // state 0 is the core working with the array, state 1 the plain reference
  logic [31:0] st_rf [2][NCORES][NREG];
  logic [31:0] st_pc [2][NCORES];

  function automatic logic [31:0] mread(int s, logic [31:0] a);
    if (s == 0) return mem.exists(a[31:2]) ? mem[a[31:2]] : 32'd0;
    return rmem.exists(a[31:2]) ? rmem[a[31:2]] : 32'd0;
  endfunction

  // executes one instruction of core i in state s; halted = reached its halt loop
  task automatic iss_step(int s, int i, output bit halted);
    logic [31:0] ins, sx, zx, a, b, res, pc;
    logic [5:0] op, fn;
    int rs, rt, rd, sh;
    bit wr;
    pc = st_pc[s][i];
    ins = imem[i][(pc - code_base(i)) >> 2];
    op = ins[31:26]; fn = ins[5:0];
    rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; sh = ins[10:6];
    sx = {{16{ins[15]}}, ins[15:0]}; zx = {16'd0, ins[15:0]};
    a = st_rf[s][i][rs]; b = st_rf[s][i][rt];
    wr = 1; res = 0; halted = 0;
    if (op == 6'h04 && rs == 0 && rt == 0 && sx == 32'hFFFF_FFFF) begin
      halted = 1;
      return;
    end
    case (op)
      6'h00: begin
        case (fn)
          6'h00: res = b << sh;           6'h02: res = b >> sh;
          6'h03: res = $signed(b) >>> sh; 6'h04: res = b << a[4:0];
          6'h21: res = a + b;             6'h23: res = a - b;
          6'h24: res = a & b;             6'h25: res = a | b;
          6'h26: res = a ^ b;             6'h2A: res = {31'd0, $signed(a) < $signed(b)};
          default: wr = 0;                // mult: HI/LO are not modelled
        endcase
        if (wr && rd != 0) st_rf[s][i][rd] = res;
        pc += 4;
      end
      6'h09: begin if (rt != 0) st_rf[s][i][rt] = a + sx; pc += 4; end
      6'h0A: begin if (rt != 0) st_rf[s][i][rt] = {31'd0, $signed(a) < $signed(sx)}; pc += 4; end
      6'h0D: begin if (rt != 0) st_rf[s][i][rt] = a | zx; pc += 4; end
      6'h0F: begin if (rt != 0) st_rf[s][i][rt] = {ins[15:0], 16'd0}; pc += 4; end
      6'h23: begin if (rt != 0) st_rf[s][i][rt] = mread(s, a + sx); pc += 4; end
      6'h2B: begin
        logic [31:0] ad;
        ad = a + sx;
        if (s == 0) mem[ad[31:2]] = b; else rmem[ad[31:2]] = b;
        pc += 4;
      end
      6'h04: pc = (a == b) ? pc + 4 + (sx << 2) : pc + 4;
      6'h05: pc = (a != b) ? pc + 4 + (sx << 2) : pc + 4;
      default: pc += 4;
    endcase
    st_pc[s][i] = pc;
  endtask

  // ------------------------------------------------------------ array memory ports
  always @(negedge clk or mem_addr)
    for (int j = 0; j < NCORES; j++) mem_rdata[j] = mread(0, mem_addr[j]);
  int n_mstall = 0, n_lent = 0, n_defer = 0, n_saved = 0, n_runs = 0, n_evict = 0;
  int n_end [4] = '{0, 0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    logic [NCORES-1:0] w;
    logic [NCORES-1:0][XLEN-1:0] a, d;
    w = mem_req & mem_gnt & mem_we; a = mem_addr; d = mem_wdata;
    for (int j = 0; j < NCORES; j++) begin
      n_mstall += int'(mem_req[j] && !mem_gnt[j]);
      n_lent   += int'(st_lent[j]);
      n_defer  += int'(st_deferred[j]);
      n_saved  += int'(st_cfg_saved[j]);
      n_runs   += int'(wb_valid[j]);
      n_evict  += int'(st_evict[j]);
      for (int e = 0; e < 4; e++) n_end[e] += int'(st_end[j][e]);
    end
    #1;
    for (int j = 0; j < NCORES; j++) if (w[j]) mem[a[j][31:2]] = d[j];
  end

  // ------------------------------------------------------------ run
  bit          done [NCORES];
  int          n_core_instr = 0;


  initial begin
    build_programs();
    for (int i = 0; i < NCORES; i++) begin
      for (int r = 0; r < NREG; r++) begin st_rf[0][i][r] = 0; st_rf[1][i][r] = 0; end
      st_pc[0][i] = code_base(i); st_pc[1][i] = code_base(i); done[i] = 0;
    end
    for (int k = 0; k < 64; k++) begin
      mem[30'((32'h0008_0000 >> 2) + k)]  = 32'h1000 + 7 * k;
      rmem[30'((32'h0008_0000 >> 2) + k)] = 32'h1000 + 7 * k;
    end
    // reference run
    for (int i = 0; i < NCORES; i++) begin
      bit h;
      h = 0;
      for (int steps = 0; steps < 100000 && !h; steps++) iss_step(1, i, h);
    end
    bt_valid = '0; bt_pc = '0; bt_instr = '0; if_pc = '0; if_valid = '0;
    prio = '{2'd0, 2'd0, 2'd0, 2'd1};
    mem_gnt = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!(done[0] && done[1] && done[2] && done[3])) begin
      @(negedge clk);
      for (int j = 0; j < NCORES; j++) mem_gnt[j] = $urandom_range(0, 3) != 0;
      bt_valid = '0;
      for (int i = 0; i < NCORES; i++) begin
        if_pc[i] = st_pc[0][i];
        for (int r = 0; r < NREG; r++) proc_rf[i][r] = st_rf[0][i][r];
        if_valid[i] = !done[i];
      end
      #1;
      for (int i = 0; i < NCORES; i++) begin
        if (wb_valid[i]) begin
          for (int r = 0; r < NREG; r++) st_rf[0][i][r] = arr_rf[i][r];
          st_pc[0][i] = wb_pc[i];
        end else if (!stall[i] && !done[i] && bt_ready[i]) begin
          logic [31:0] pc0, ins0;
          bit h;
          pc0 = st_pc[0][i];
          ins0 = imem[i][(pc0 - code_base(i)) >> 2];
          iss_step(0, i, h);
          if (h) begin
            done[i] = 1;
          end else begin
            bt_valid[i] = 1; bt_pc[i] = pc0; bt_instr[i] = ins0;
            n_core_instr++;
          end
        end
      end
    end
    repeat (4) @(negedge clk);
    for (int i = 0; i < NCORES; i++) begin
      for (int r = 0; r < NREG; r++) begin
        checks++;
        if (st_rf[0][i][r] !== st_rf[1][i][r]) begin
          failures++;
          $display("FAIL core %0d r%0d got %h exp %h", i, r, st_rf[0][i][r], st_rf[1][i][r]);
        end
      end
      checks++;
      if (st_pc[0][i] !== st_pc[1][i]) begin failures++; $display("FAIL core %0d final pc", i); end
    end
    foreach (rmem[a]) begin
      checks++;
      if (mread(0, {a, 2'b00}) !== rmem[a]) begin failures++; $display("FAIL memory word %h", a); end
    end
    $display("cycles=%0d core instructions=%0d configurations saved=%0d run=%0d", cycles, n_core_instr, n_saved, n_runs);
    $display("PE lending=%0d deferrals=%0d memory stalls=%0d evictions=%0d", n_lent, n_defer, n_mstall, n_evict);
    $display("ends: branch=%0d unsupported=%0d resource=%0d pc jump=%0d", n_end[0], n_end[1], n_end[2], n_end[3]);
    begin
      int ev [9];
      string nm [9];
      ev = '{n_saved, n_runs, n_lent, n_defer, n_mstall, n_end[0], n_end[1], n_end[2], n_end[3]};
      nm = '{"configuration saved", "configuration run", "PE lending", "deferral",
                        "memory stall", "end by branch", "end by unsupported instruction",
                        "end by resources", "end by PC jump"};
      for (int e = 0; e < 9; e++) begin
        checks++;
        if (ev[e] == 0) begin failures++; $display("FAIL mechanism never happened: %s", nm[e]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
