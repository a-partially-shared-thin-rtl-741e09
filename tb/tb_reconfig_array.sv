// tb_reconfig_array: self-checking test of the reconfigurable array.
// Each core's register file is loaded with a random context, then each core
// streams random configuration words (up to five operations, at most one of
// them a load or store into the core's own memory region, operations within
// a word independent as the binary translator makes them) with random gaps,
// random thread priorities and a memory that withholds grants at random.
// A reference model executes every accepted word atomically on its own copy
// of the register files and memory; at the end all four register files and
// the memory must match. The test also requires that PE lending, deferral
// and memory stalls each happened.
module tb_reconfig_array;
  import rca_pkg::*;

  localparam int NW = 400;   // words per core

  logic clk = 0, rst_n = 0;
  logic   [NCORES-1:0]                     in_valid, in_ready, busy, rf_load, lent, deferred;
  cword_t [NCORES-1:0]                     in_word;
  logic   [NCORES-1:0][PRIO_W-1:0]         prio;
  logic   [NCORES-1:0][NREG-1:0][XLEN-1:0] rf_load_data, rf_regs;
  logic   [NCORES-1:0]                     mem_req, mem_we, mem_gnt;
  logic   [NCORES-1:0][XLEN-1:0]           mem_addr, mem_wdata, mem_rdata;
  logic   [NCORES-1:0][NPE-1:0]            at_tab;
  logic   [NCORES-1:0][1:0]                rt_tab;

  reconfig_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_lent = 0, n_defer = 0, n_mstall = 0;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory (word addressed by addr[31:2]), shared by the ports
  logic [31:0] mem [logic [29:0]];
  logic [31:0] mmem [logic [29:0]];
  always_comb
    for (int j = 0; j < NCORES; j++)
      mem_rdata[j] = mem.exists(mem_addr[j][31:2]) ? mem[mem_addr[j][31:2]] : 32'd0;
  always @(posedge clk) if (rst_n) begin
    logic [NCORES-1:0] w;
    logic [NCORES-1:0][XLEN-1:0] a, d;
    w = mem_req & mem_gnt & mem_we;
    a = mem_addr;
    d = mem_wdata;
    #1;
    for (int j = 0; j < NCORES; j++) if (w[j]) mem[a[j][31:2]] = d[j];
  end
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < NCORES; j++) if (mem_req[j] && !mem_gnt[j]) n_mstall++;
    for (int j = 0; j < NCORES; j++) begin n_lent += int'(lent[j]); n_defer += int'(deferred[j]); end
  end
  always @(negedge clk) for (int j = 0; j < NCORES; j++) mem_gnt[j] = $urandom_range(0, 3) != 0;

  // reference model
  logic [31:0] mrf [NCORES][NREG];
  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      OP_ADD: return a + b;   OP_SUB: return a - b;   OP_AND: return a & b;
      OP_OR:  return a | b;   OP_XOR: return a ^ b;   OP_NOR: return ~(a | b);
      OP_SLT: return 32'($signed(a) < $signed(b));    OP_SLTU: return 32'(a < b);
      OP_SLL: return a << b[4:0]; OP_SRL: return a >> b[4:0];
      OP_SRA: return $signed(a) >>> b[4:0];           default: return {b[15:0], 16'h0};
    endcase
  endfunction
  task automatic model_word(int i, cword_t w);
    logic [31:0] nv [NREG];
    for (int r = 0; r < NREG; r++) nv[r] = mrf[i][r];
    for (int s = 0; s < NSLOT; s++) if (w[s].valid) begin
      logic [31:0] a, b, addr;
      a = mrf[i][w[s].ra];
      b = w[s].b_imm ? w[s].imm : mrf[i][w[s].rb];
      if (w[s].is_mem) begin
        addr = a + w[s].imm;
        if (w[s].is_store) mmem[addr[31:2]] = mrf[i][w[s].rb];
        else if (w[s].rd != 0) nv[w[s].rd] = mmem.exists(addr[31:2]) ? mmem[addr[31:2]] : 32'd0;
      end else if (w[s].rd != 0) nv[w[s].rd] = ref_alu(w[s].op, a, b);
    end
    for (int r = 0; r < NREG; r++) mrf[i][r] = nv[r];
  endtask

  function automatic cword_t gen_word(int i);
    cword_t w = '0;
    logic [31:0] rd_set = 0, wr_set = 0;
    bit mem_used = 0;
    int n = $urandom_range(1, 5);
    for (int s = 0; s < n; s++) begin
      logic [4:0] ra, rb, rd;
      do ra = 5'($urandom); while (wr_set[ra]);
      do rb = 5'($urandom); while (wr_set[rb]);
      do rd = 5'($urandom_range(1, 31)); while (rd_set[rd] || wr_set[rd]);
      w[s].valid = 1; w[s].ra = ra; w[s].rb = rb; w[s].rd = rd;
      w[s].op = alu_op_e'($urandom_range(0, 11));
      w[s].b_imm = $urandom_range(0, 2) == 0;
      w[s].imm = $urandom;
      if (!mem_used && $urandom_range(0, 3) == 0) begin
        mem_used = 1;
        w[s].is_mem = 1; w[s].is_store = $urandom_range(0, 1);
        w[s].ra = 0; w[s].b_imm = 0;
        w[s].imm = 32'h1000 * (i + 1) + 4 * $urandom_range(0, 15);
        if (w[s].is_store) w[s].rd = 0;
      end
      rd_set[w[s].ra] = 1; if (!w[s].b_imm || w[s].is_store) rd_set[w[s].rb] = 1;
      if (w[s].rd != 0) wr_set[w[s].rd] = 1;
    end
    return w;
  endfunction

  int sent [NCORES];
  logic [NCORES-1:0] acc;
  initial begin
    in_valid = '0; in_word = '0; prio = '0; rf_load = '0;
    for (int i = 0; i < NCORES; i++) begin
      sent[i] = 0;
      for (int r = 0; r < NREG; r++) begin
        rf_load_data[i][r] = (r == 0) ? 32'd0 : $urandom;
        mrf[i][r] = rf_load_data[i][r];
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rf_load = '1;
    @(negedge clk);
    rf_load = '0;
    while (sent[0] < NW || sent[1] < NW || sent[2] < NW || sent[3] < NW) begin
      for (int i = 0; i < NCORES; i++) begin
        prio[i] = 2'($urandom);
        if (!in_valid[i] && sent[i] < NW && $urandom_range(0, 4) != 0) begin
          in_word[i]  = gen_word(i);
          in_valid[i] = 1;
        end
      end
      #2;
      acc = in_valid & in_ready;
      @(posedge clk);
      #1;
      for (int i = 0; i < NCORES; i++) if (acc[i]) begin
        model_word(i, in_word[i]);
        sent[i]++;
        in_valid[i] = 0;
      end
      @(negedge clk);
    end
    while (busy != '0) @(negedge clk);
    for (int i = 0; i < NCORES; i++)
      for (int r = 0; r < NREG; r++) begin
        checks++;
        if (rf_regs[i][r] !== mrf[i][r]) begin
          failures++;
          $display("FAIL core %0d r%0d got %h exp %h", i, r, rf_regs[i][r], mrf[i][r]);
        end
      end
    foreach (mmem[a]) begin
      checks++;
      if (!mem.exists(a) || mem[a] !== mmem[a]) begin failures++; $display("FAIL mem %h", a); end
    end
    checks += 3;
    if (n_lent == 0)   begin failures++; $display("FAIL no PE was lent"); end
    if (n_defer == 0)  begin failures++; $display("FAIL no operation was deferred"); end
    if (n_mstall == 0) begin failures++; $display("FAIL no memory stall"); end
    $display("lent=%0d deferred=%0d memory stalls=%0d cycles=%0d", n_lent, n_defer, n_mstall, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
