// binary_translator: builds configurations for the reconfigurable array from
// the instruction stream a core executes, at run time and without compiler
// help.
//
// Instructions arrive in program order (in_valid/in_ready with their PC) and
// go through five stages:
//   ID  decode: operation, source and target registers, immediate;
//   DV  dependency verification: the write bitmap table (one bit per register
//       and configuration word) gives the first word after the last producer
//       of a source (true dependence); memory operations also follow the last
//       memory operation, so memory keeps program order;
//   RA  resource allocation: the resource table (operations used per word, at
//       most five, at most one of them a memory operation for the load/store
//       unit) gives the first word from there on with room;
//   RR  false dependences: with the read table (source registers per word) and
//       the write bitmap, the instruction is moved behind the last word that
//       reads or writes its target, searching the resource table again;
//   UT  update tables: the operation is written into its word's slot and the
//       three tables are updated.
// A configuration ends at a branch or jump, at an instruction the array does
// not support, when no word has room (that instruction then starts the next
// configuration), or when the PC stream is not sequential (the array ran a
// configuration in between). An ended configuration with at least MIN_INSTR
// instructions is sent to the configuration cache (cfg_valid for one cycle),
// with its start PC, the PC the core resumes at and its number of words.
// Timing: the tables are read by DV, RA and RR and written by UT, so one
// instruction is in DV..RR at a time: the translator takes one instruction
// every 4 cycles (in_ready) and emits a configuration 5 cycles after the
// instruction that ends it is taken.
// From the document: the five stages and their order, the three tables, the
// columns seen as holding five PEs, the end conditions. This design's choices:
// the RR stage resolves false dependences by placement rather than by
// renaming to spare registers (the array register files have no spare
// entries); configurations do not extend past a branch (no speculation);
// 16 words per configuration; the supported MIPS subset (integer ALU
// register and immediate forms, shifts, LUI, LW, SW; ADD/ADDI do not trap);
// register-0 targets (NOPs) are absorbed without using a slot.
module binary_translator
  import rca_pkg::*;
#(
  parameter int unsigned WORDS     = NWORDS,
  parameter int unsigned MIN_INSTR = 3
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [XLEN-1:0]     in_pc,
  input  logic [31:0]         in_instr,
  output logic                in_ready,
  output logic                cfg_valid,
  output chdr_t               cfg_hdr,
  output cword_t [WORDS-1:0]  cfg_words,
  // why the last configuration ended (one-cycle pulses, with cfg_valid or not)
  output logic                end_branch,
  output logic                end_unsupported,
  output logic                end_resource,
  output logic                end_discontinuity
);

  localparam int unsigned CW = $clog2(WORDS + 1);   // word count 0..WORDS
  localparam int unsigned PW = $clog2(WORDS);       // word index

  typedef enum logic [2:0] {K_ALU, K_MEM, K_NOP, K_BRANCH, K_UNSUP} kind_e;

  typedef struct packed {
    kind_e           kind;
    logic [XLEN-1:0] pc;
    logic            use_a;
    logic            use_b;
    logic            fresh;    // starts a new configuration (set in DV)
    logic [CW-1:0]   col;      // word chosen (DV: lowest allowed)
    logic            ok;       // a word with room was found
    slot_t           slot;
  } inst_t;

  function automatic inst_t decode(logic [XLEN-1:0] pc, logic [31:0] ins);
    inst_t d;
    logic [5:0]  opc, fn;
    logic [4:0]  rs, rt, rd, sh;
    logic [31:0] sx, zx;
    opc = ins[31:26]; fn = ins[5:0];
    rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; sh = ins[10:6];
    sx = {{16{ins[15]}}, ins[15:0]};
    zx = {16'd0, ins[15:0]};
    d = '0;
    d.pc         = pc;
    d.kind       = K_UNSUP;
    d.slot.valid = 1'b1;
    d.slot.ra    = rs;
    d.slot.rb    = rt;
    d.slot.rd    = rt;
    d.use_a      = 1'b1;
    unique case (opc)
      6'h00: begin
        d.slot.rd = rd;
        d.kind    = K_ALU;
        d.use_b   = 1'b1;
        unique case (fn)
          6'h00, 6'h02, 6'h03: begin   // SLL/SRL/SRA by shamt
            d.slot.op    = (fn == 6'h00) ? OP_SLL : (fn == 6'h02) ? OP_SRL : OP_SRA;
            d.slot.ra    = rt;
            d.slot.b_imm = 1'b1;
            d.slot.imm   = {27'd0, sh};
            d.use_b      = 1'b0;
          end
          6'h04, 6'h06, 6'h07: begin   // SLLV/SRLV/SRAV
            d.slot.op = (fn == 6'h04) ? OP_SLL : (fn == 6'h06) ? OP_SRL : OP_SRA;
            d.slot.ra = rt;
            d.slot.rb = rs;
          end
          6'h20, 6'h21: d.slot.op = OP_ADD;
          6'h22, 6'h23: d.slot.op = OP_SUB;
          6'h24:        d.slot.op = OP_AND;
          6'h25:        d.slot.op = OP_OR;
          6'h26:        d.slot.op = OP_XOR;
          6'h27:        d.slot.op = OP_NOR;
          6'h2A:        d.slot.op = OP_SLT;
          6'h2B:        d.slot.op = OP_SLTU;
          6'h08, 6'h09: d.kind    = K_BRANCH;  // JR, JALR
          default:      d.kind    = K_UNSUP;
        endcase
      end
      6'h08, 6'h09: begin d.kind = K_ALU; d.slot.op = OP_ADD;  d.slot.b_imm = 1'b1; d.slot.imm = sx; end
      6'h0A:        begin d.kind = K_ALU; d.slot.op = OP_SLT;  d.slot.b_imm = 1'b1; d.slot.imm = sx; end
      6'h0B:        begin d.kind = K_ALU; d.slot.op = OP_SLTU; d.slot.b_imm = 1'b1; d.slot.imm = sx; end
      6'h0C:        begin d.kind = K_ALU; d.slot.op = OP_AND;  d.slot.b_imm = 1'b1; d.slot.imm = zx; end
      6'h0D:        begin d.kind = K_ALU; d.slot.op = OP_OR;   d.slot.b_imm = 1'b1; d.slot.imm = zx; end
      6'h0E:        begin d.kind = K_ALU; d.slot.op = OP_XOR;  d.slot.b_imm = 1'b1; d.slot.imm = zx; end
      6'h0F: begin
        d.kind = K_ALU; d.slot.op = OP_LUI; d.slot.b_imm = 1'b1; d.slot.imm = zx;
        d.use_a = 1'b0; d.slot.ra = 5'd0;
      end
      6'h23: begin d.kind = K_MEM; d.slot.is_mem = 1'b1; d.slot.imm = sx; end
      6'h2B: begin
        d.kind = K_MEM; d.slot.is_mem = 1'b1; d.slot.is_store = 1'b1; d.slot.imm = sx;
        d.slot.rd = 5'd0; d.use_b = 1'b1;
      end
      6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h06, 6'h07: d.kind = K_BRANCH;
      default: d.kind = K_UNSUP;
    endcase
    if (d.kind == K_ALU && d.slot.rd == 5'd0) d.kind = K_NOP;
    if (d.kind != K_ALU && d.kind != K_MEM) d.slot = '0;
    if (!d.slot.b_imm && !d.slot.is_mem) d.use_b = 1'b1;
    return d;
  endfunction

  // ---------------- configuration under construction (the tables)
  logic [WORDS-1:0][NREG-1:0] wbm_q;     // write bitmap table
  logic [WORDS-1:0][NREG-1:0] rdt_q;     // read table
  logic [WORDS-1:0][2:0]      used_q;    // resource table: operations per word
  logic [WORDS-1:0]           memu_q;    // resource table: load/store unit used
  cword_t [WORDS-1:0]         words_q;
  logic                       open_q;
  logic [XLEN-1:0]            start_pc_q, exp_pc_q;
  logic [15:0]                ninstr_q;
  logic [CW-1:0]              nw_q;
  logic                       has_mem_q;
  logic [CW-1:0]              last_mem_q;

  // ---------------- pipeline registers
  // s_id: decoded (ID done), evaluated by DV; s_dv: evaluated by RA;
  // s_ra: evaluated by RR; s_rr: evaluated by UT
  logic  v_id, v_dv, v_ra, v_rr;
  inst_t s_id, s_dv, s_ra, s_rr;

  logic go_dv;
  assign go_dv    = v_id && !(v_dv || v_ra || v_rr);
  assign in_ready = !v_id || go_dv;

  // DV: lowest word allowed by true dependences and memory order
  inst_t dv_out;
  always_comb begin
    dv_out       = s_id;
    dv_out.fresh = !open_q || (s_id.pc != exp_pc_q);
    dv_out.col   = '0;
    if (!dv_out.fresh) begin
      for (int c = 0; c < WORDS; c++) begin
        if ((s_id.use_a && s_id.slot.ra != 5'd0 && wbm_q[c][s_id.slot.ra]) ||
            (s_id.use_b && s_id.slot.rb != 5'd0 && wbm_q[c][s_id.slot.rb]))
          dv_out.col = CW'(c + 1);
      end
      if (s_id.kind == K_MEM && has_mem_q && dv_out.col <= last_mem_q)
        dv_out.col = last_mem_q + 1'b1;
    end
  end

  function automatic logic room(logic [2:0] used, logic memu, logic is_mem);
    return (used < 3'(NSLOT)) && !(is_mem && memu);
  endfunction

  // RA: first word with room at or after the DV bound
  inst_t ra_out;
  always_comb begin
    ra_out    = s_dv;
    ra_out.ok = 1'b0;
    if (s_dv.fresh) begin
      ra_out.col = '0;
      ra_out.ok  = 1'b1;
    end else begin
      for (int c = WORDS - 1; c >= 0; c--)
        if (CW'(c) >= s_dv.col && room(used_q[c], memu_q[c], s_dv.slot.is_mem)) begin
          ra_out.col = CW'(c);
          ra_out.ok  = 1'b1;
        end
    end
  end

  // RR: behind the last reader and the last writer of the target register
  inst_t         rr_out;
  logic [CW-1:0] fd;
  always_comb begin
    rr_out = s_ra;
    fd     = '0;
    if (!s_ra.fresh && s_ra.ok && s_ra.slot.rd != 5'd0) begin
      for (int c = 0; c < WORDS; c++)
        if (rdt_q[c][s_ra.slot.rd] || wbm_q[c][s_ra.slot.rd])
          fd = CW'(c + 1);
      if (s_ra.col < fd) begin
        rr_out.ok = 1'b0;
        for (int c = WORDS - 1; c >= 0; c--)
          if (CW'(c) >= fd && room(used_q[c], memu_q[c], s_ra.slot.is_mem)) begin
            rr_out.col = CW'(c);
            rr_out.ok  = 1'b1;
          end
      end
    end
  end

  // UT decisions
  logic is_term, is_op, discont, need_final, restart, emit;
  logic [CW-1:0] place;
  always_comb begin
    is_term    = (s_rr.kind == K_BRANCH) || (s_rr.kind == K_UNSUP);
    is_op      = (s_rr.kind == K_ALU) || (s_rr.kind == K_MEM);
    discont    = open_q && s_rr.fresh;
    need_final = v_rr && open_q && (is_term || discont || (is_op && !s_rr.ok));
    restart    = !open_q || discont || (is_op && !s_rr.ok);
    place      = restart ? '0 : s_rr.col;
    emit       = need_final && (ninstr_q >= 16'(MIN_INSTR)) && (nw_q != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_id <= 1'b0; v_dv <= 1'b0; v_ra <= 1'b0; v_rr <= 1'b0;
      s_id <= '0;   s_dv <= '0;   s_ra <= '0;   s_rr <= '0;
      wbm_q <= '0; rdt_q <= '0; used_q <= '0; memu_q <= '0; words_q <= '0;
      open_q <= 1'b0; start_pc_q <= '0; exp_pc_q <= '0; ninstr_q <= '0;
      nw_q <= '0; has_mem_q <= 1'b0; last_mem_q <= '0;
      cfg_valid <= 1'b0; cfg_hdr <= '0; cfg_words <= '0;
      end_branch <= 1'b0; end_unsupported <= 1'b0;
      end_resource <= 1'b0; end_discontinuity <= 1'b0;
    end else begin
      // pipeline movement
      if (in_ready) begin
        v_id <= in_valid;
        if (in_valid) s_id <= decode(in_pc, in_instr);
      end
      v_dv <= go_dv;
      if (go_dv) s_dv <= dv_out;
      v_ra <= v_dv;
      if (v_dv) s_ra <= ra_out;
      v_rr <= v_ra;
      if (v_ra) s_rr <= rr_out;

      // end of a configuration
      cfg_valid         <= emit;
      end_branch        <= need_final && s_rr.kind == K_BRANCH;
      end_unsupported   <= need_final && s_rr.kind == K_UNSUP;
      end_resource      <= need_final && is_op && !s_rr.ok && !discont;
      end_discontinuity <= need_final && discont;
      if (need_final) begin
        cfg_hdr   <= '{pc: start_pc_q, next_pc: exp_pc_q, nwords: 5'(nw_q)};
        cfg_words <= words_q;
      end

      // UT: update the tables
      if (v_rr) begin
        if (is_term) begin
          open_q <= 1'b0;
        end else begin
          if (restart) begin
            wbm_q <= '0; rdt_q <= '0; used_q <= '0; memu_q <= '0; words_q <= '0;
            has_mem_q <= 1'b0; nw_q <= '0;
            start_pc_q <= s_rr.pc;
            ninstr_q   <= 16'd1;
          end else begin
            ninstr_q   <= ninstr_q + 16'd1;
          end
          open_q   <= 1'b1;
          exp_pc_q <= s_rr.pc + 32'd4;
          if (is_op) begin
            automatic logic [PW-1:0] pw       = place[PW-1:0];
            automatic logic [2:0]    used_old = restart ? 3'd0 : used_q[pw];
            words_q[pw][used_old] <= s_rr.slot;
            used_q[pw] <= used_old + 3'd1;
            if (s_rr.slot.rd != 5'd0) wbm_q[pw][s_rr.slot.rd] <= 1'b1;
            if (s_rr.use_a && s_rr.slot.ra != 5'd0) rdt_q[pw][s_rr.slot.ra] <= 1'b1;
            if (s_rr.use_b && s_rr.slot.rb != 5'd0) rdt_q[pw][s_rr.slot.rb] <= 1'b1;
            if (s_rr.slot.is_mem) begin
              memu_q[pw] <= 1'b1;
              has_mem_q     <= 1'b1;
              last_mem_q    <= place;
            end
            if (restart || place + 1'b1 > nw_q) nw_q <= place + 1'b1;
          end
        end
      end
    end
  end

endmodule
