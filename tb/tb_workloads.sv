// tb_workloads: the four kernels of the evaluation, scaled down, run on the
// complete four-core system at its default sizes.
// Each core runs one kernel, all four at the same time and sharing the array:
//   core 0  bitcount: counts the set bits of 16 integers (shift-and-mask
//           method), stores each count and sums them;
//   core 1  matrix multiplication of two 4x4 integer matrices;
//   core 2  Laplacian filter (4*centre - north - south - west - east) over
//           the inner pixels of an 8x6 image;
//   core 3  LU decomposition (no pivoting, integer division) of a 4x4 matrix,
//           in place.
// The kernels are written as straight-line code generated below, inside an
// outer loop that runs each kernel three times, so that configurations are
// built in the first pass and reused afterwards. Multiply and divide are not
// operations of the array's PEs: the core executes them, and they end
// configurations.
// Each core is modelled by an instruction-set model (one instruction per
// cycle, no branch delay slot). It hands every instruction it executes to its
// binary translator, stops while its configuration controller stalls it and
// takes registers and PC back at write-back. A plain run of the same code
// on the model alone gives the expected registers and memory. Memory grants
// to the load/store units are withheld at random. Besides comparing all
// registers and data, the test requires that every core ran at least one
// configuration, and prints per kernel the cycles taken and the share of
// instructions executed by the array.
module tb_workloads;
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
    wait (cycles == 400000);
    failures++;
    for (int i = 0; i < NCORES; i++)
      $display("watchdog expired: core %0d pc %h done %0d stall %0d", i, st_pc[0][i], done[i], stall[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ programs
  localparam int PLEN = 512;
  localparam int REPS = 3;
  logic [31:0] imem [NCORES][PLEN];
  int          plen [NCORES];

  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] R(int fn, int rs, int rt, int rd, int sh);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] MUL(int rs, int rt, int rd);   // mul rd, rs, rt
    return {6'h1C, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h02};
  endfunction
  function automatic logic [31:0] code_base(int i);
    return 32'h0001_0000 * (i + 1);
  endfunction
  function automatic logic [31:0] data_base(int i);
    return 32'h0008_0000 + 32'h0001_0000 * i;
  endfunction

  int n;
  task automatic emit(int i, logic [31:0] ins);
    imem[i][n] = ins;
    n++;
  endtask
  task automatic emit_li(int i, int r, logic [31:0] v);   // lui + ori
    emit(i, I(6'h0F, 0, r, int'(v[31:16])));
    emit(i, I(6'h0D, r, r, int'(v[15:0])));
  endtask

  // common frame: data pointer r20, repeat counter r30, kernel, loop, halt
  task automatic prologue(int i);
    n = 0;
    emit(i, I(6'h0F, 0, 20, int'(data_base(i) >> 16)));   // lui r20
    emit(i, I(9, 0, 30, REPS));                            // addiu r30, r0, REPS
  endtask
  task automatic epilogue(int i, int body);
    emit(i, I(9, 30, 30, -1));                             // addiu r30, r30, -1
    emit(i, I(5, 30, 0, body - (n + 1)));                  // bne r30, r0, body
    emit(i, I(4, 0, 0, -1));                               // halt: beq r0, r0, self
    plen[i] = n;
  endtask

  task automatic build_programs();
    int body;
    for (int i = 0; i < NCORES; i++) for (int k = 0; k < PLEN; k++) imem[i][k] = 32'h0;
    // core 0: bitcount of 16 words at r20, counts to r20+0x100, sum in r2
    prologue(0);
    emit_li(0, 21, 32'h5555_5555);
    emit_li(0, 22, 32'h3333_3333);
    emit_li(0, 23, 32'h0F0F_0F0F);
    body = n;
    emit(0, I(9, 0, 2, 0));                                // sum = 0
    for (int k = 0; k < 16; k++) begin
      int x, t;
      x = (k % 2) ? 4 : 1;
      t = (k % 2) ? 5 : 3;
      emit(0, I(6'h23, 20, x, 4 * k));                     // lw x
      emit(0, R(6'h02, 0, x, t, 1));                       // srl t, x, 1
      emit(0, R(6'h24, t, 21, t, 0));                      // and t, t, 0x55..
      emit(0, R(6'h23, x, t, x, 0));                       // subu x, x, t
      emit(0, R(6'h02, 0, x, t, 2));                       // srl t, x, 2
      emit(0, R(6'h24, t, 22, t, 0));                      // and t, t, 0x33..
      emit(0, R(6'h24, x, 22, x, 0));                      // and x, x, 0x33..
      emit(0, R(6'h21, x, t, x, 0));                       // addu x, x, t
      emit(0, R(6'h02, 0, x, t, 4));                       // srl t, x, 4
      emit(0, R(6'h21, x, t, x, 0));                       // addu
      emit(0, R(6'h24, x, 23, x, 0));                      // and x, x, 0x0F..
      emit(0, R(6'h02, 0, x, t, 8));                       // srl t, x, 8
      emit(0, R(6'h21, x, t, x, 0));
      emit(0, R(6'h02, 0, x, t, 16));                      // srl t, x, 16
      emit(0, R(6'h21, x, t, x, 0));
      emit(0, I(6'h0C, x, x, 16'h003F));                   // andi x, x, 63
      emit(0, I(6'h2B, 20, x, 16'h100 + 4 * k));           // sw count
      emit(0, R(6'h21, 2, x, 2, 0));                       // addu sum
    end
    epilogue(0, body);

    // core 1: C = A * B, 4x4, A at r20, B at r20+0x40, C at r20+0x80
    prologue(1);
    body = n;
    for (int ii = 0; ii < 4; ii++)
      for (int jj = 0; jj < 4; jj++) begin
        for (int k = 0; k < 4; k++) begin
          emit(1, I(6'h23, 20, 1 + k, 16 * ii + 4 * k));         // lw A[ii][k]
          emit(1, I(6'h23, 20, 5 + k, 16'h40 + 16 * k + 4 * jj)); // lw B[k][jj]
        end
        for (int k = 0; k < 4; k++) emit(1, MUL(1 + k, 5 + k, 11 + k));
        emit(1, R(6'h21, 11, 12, 15, 0));
        emit(1, R(6'h21, 13, 14, 16, 0));
        emit(1, R(6'h21, 15, 16, 17, 0));
        emit(1, I(6'h2B, 20, 17, 16'h80 + 16 * ii + 4 * jj));     // sw C[ii][jj]
      end
    epilogue(1, body);

    // core 2: Laplacian over the inner pixels of an 8x6 image at r20,
    // output image at r20+0x100
    prologue(2);
    body = n;
    for (int y = 1; y < 5; y++)
      for (int x = 1; x < 7; x++) begin
        int b, p;
        b = ((x + y) % 2) ? 1 : 7;          // two register sets for overlap
        p = 4 * (8 * y + x);
        emit(2, I(6'h23, 20, b,     p));
        emit(2, I(6'h23, 20, b + 1, p - 32));
        emit(2, I(6'h23, 20, b + 2, p + 32));
        emit(2, I(6'h23, 20, b + 3, p - 4));
        emit(2, I(6'h23, 20, b + 4, p + 4));
        emit(2, R(6'h00, 0, b, b, 2));                     // sll c, c, 2
        emit(2, R(6'h21, b + 1, b + 2, b + 1, 0));         // n + s
        emit(2, R(6'h21, b + 3, b + 4, b + 3, 0));         // w + e
        emit(2, R(6'h23, b, b + 1, b, 0));
        emit(2, R(6'h23, b, b + 3, b, 0));
        emit(2, I(6'h2B, 20, b, 16'h100 + p));
      end
    epilogue(2, body);

    // core 3: in-place LU decomposition of a 4x4 matrix at r20:
    // for each k, row i > k: l = a[i][k] / a[k][k]; a[i][k] = l;
    // a[i][j] -= l * a[k][j] for j > k
    prologue(3);
    body = n;
    for (int k = 0; k < 3; k++)
      for (int ii = k + 1; ii < 4; ii++) begin
        emit(3, I(6'h23, 20, 1, 16 * k + 4 * k));          // akk
        emit(3, I(6'h23, 20, 2, 16 * ii + 4 * k));         // aik
        emit(3, R(6'h1A, 2, 1, 0, 0));                     // div aik, akk
        emit(3, R(6'h12, 0, 0, 3, 0));                     // mflo l
        emit(3, I(6'h2B, 20, 3, 16 * ii + 4 * k));
        for (int j = k + 1; j < 4; j++) begin
          emit(3, I(6'h23, 20, 4 + j, 16 * k + 4 * j));     // akj
          emit(3, I(6'h23, 20, 8 + j, 16 * ii + 4 * j));    // aij
          emit(3, MUL(3, 4 + j, 12 + j));
          emit(3, R(6'h23, 8 + j, 12 + j, 8 + j, 0));       // aij -= l * akj
          emit(3, I(6'h2B, 20, 8 + j, 16 * ii + 4 * j));
        end
      end
    epilogue(3, body);
  endtask

  function automatic logic [31:0] init_word(int i, int k);
    logic [31:0] h;
    case (i)
      0: begin                                             // integers to count
        h = 32'h9E37_79B9 * (k + 1);
        h = h ^ (h >> 15);
        return h;
      end
      1: return (k < 32) ? 32'(k % 7 + 1) : 32'd0;        // A, B
      2: return (k < 48) ? 32'((k * 37 + (k / 8) * 11) % 256) : 32'd0;  // pixels
      default: return (k < 16) ? ((k % 5 == 0) ? 32'd60 + k : 32'(k % 4 + 1)) : 32'd0;
    endcase
  endfunction

  // ------------------------------------------------------------ memory
  logic [31:0] mem  [logic [29:0]];
  logic [31:0] rmem [logic [29:0]];

  // ------------------------------------------------------------ instruction-set model
  // state 0 is the core working with the array, state 1 the plain reference
  logic [31:0] st_rf [2][NCORES][NREG];
  logic [31:0] st_pc [2][NCORES];
  logic [31:0] st_lo [2][NCORES];

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
          6'h21: res = a + b;             6'h23: res = a - b;
          6'h24: res = a & b;             6'h12: res = st_lo[s][i];
          6'h1A: begin
            wr = 0;
            st_lo[s][i] = (b == 0) ? 32'd0 : 32'($signed(a) / $signed(b));
          end
          default: wr = 0;
        endcase
        if (wr && rd != 0) st_rf[s][i][rd] = res;
        pc += 4;
      end
      6'h1C: begin if (rd != 0) st_rf[s][i][rd] = a * b; pc += 4; end
      6'h09: begin if (rt != 0) st_rf[s][i][rt] = a + sx; pc += 4; end
      6'h0C: begin if (rt != 0) st_rf[s][i][rt] = a & zx; pc += 4; end
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
  int n_lent = 0, n_defer = 0, n_saved = 0;
  int n_runs [NCORES];
  always @(posedge clk) if (rst_n) begin
    logic [NCORES-1:0] w;
    logic [NCORES-1:0][XLEN-1:0] a, d;
    w = mem_req & mem_gnt & mem_we; a = mem_addr; d = mem_wdata;
    for (int j = 0; j < NCORES; j++) begin
      n_lent  += int'(st_lent[j]);
      n_defer += int'(st_deferred[j]);
      n_saved += int'(st_cfg_saved[j]);
      n_runs[j] += int'(wb_valid[j]);
    end
    #1;
    for (int j = 0; j < NCORES; j++) if (w[j]) mem[a[j][31:2]] = d[j];
  end

  // ------------------------------------------------------------ run
  bit done [NCORES];
  int ref_instr [NCORES];
  int core_instr [NCORES];
  int done_cycle [NCORES];
  string kname [NCORES];

  initial begin
    kname = '{"bitcount", "matrix multiplication", "Laplacian filter", "LU decomposition"};
    build_programs();
    for (int i = 0; i < NCORES; i++) begin
      for (int r = 0; r < NREG; r++) begin st_rf[0][i][r] = 0; st_rf[1][i][r] = 0; end
      st_pc[0][i] = code_base(i); st_pc[1][i] = code_base(i);
      st_lo[0][i] = 0; st_lo[1][i] = 0;
      done[i] = 0; ref_instr[i] = 0; core_instr[i] = 0; n_runs[i] = 0; done_cycle[i] = 0;
      for (int k = 0; k < 64; k++) begin
        mem[30'((data_base(i) >> 2) + k)]  = init_word(i, k);
        rmem[30'((data_base(i) >> 2) + k)] = init_word(i, k);
      end
    end
    // reference run
    for (int i = 0; i < NCORES; i++) begin
      bit h;
      h = 0;
      while (!h && ref_instr[i] < 100000) begin
        iss_step(1, i, h);
        if (!h) ref_instr[i]++;
      end
    end
    bt_valid = '0; bt_pc = '0; bt_instr = '0; if_pc = '0; if_valid = '0;
    prio = '{2'd0, 2'd1, 2'd0, 2'd1};
    mem_gnt = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!(done[0] && done[1] && done[2] && done[3])) begin
      @(negedge clk);
      for (int j = 0; j < NCORES; j++) mem_gnt[j] = $urandom_range(0, 7) != 0;
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
            done_cycle[i] = cycles;
          end else begin
            bt_valid[i] = 1; bt_pc[i] = pc0; bt_instr[i] = ins0;
            core_instr[i]++;
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
      checks++;
      if (n_runs[i] == 0) begin failures++; $display("FAIL core %0d ran no configuration", i); end
      $display("%-22s instructions=%0d on core=%0d on array=%0d (%0d%%) cycles=%0d configurations run=%0d",
               kname[i], ref_instr[i], core_instr[i], ref_instr[i] - core_instr[i],
               100 * (ref_instr[i] - core_instr[i]) / ref_instr[i], done_cycle[i], n_runs[i]);
    end
    foreach (rmem[a]) begin
      checks++;
      if (mread(0, {a, 2'b00}) !== rmem[a]) begin failures++; $display("FAIL memory word %h", a); end
    end
    $display("configurations saved=%0d PE lending=%0d deferrals=%0d", n_saved, n_lent, n_defer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
