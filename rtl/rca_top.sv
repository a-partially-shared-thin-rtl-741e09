// rca_top: the reconfigurable side of a four-core processor with a partially
// shared thin reconfigurable array.
//
// Each of the four cores has a binary translator, which turns the instructions
// the core executes into configurations, a configuration cache of 128
// configurations, and a configuration controller, which starts a
// configuration when the core's PC reaches its first instruction. All four
// controllers feed one reconfigurable array: four thin columns of three PEs
// and a load/store unit, four array register files and the configuration
// scheduler, which lends idle PEs of one column to cores whose configuration
// words need more than three PEs.
// The cores themselves (5-stage MIPS pipelines), their L1 caches and the
// directory-based coherence are outside this module; their signals are its
// ports:
//   bt_*        instruction stream of core i (PC and instruction, in program
//               order, one per bt_valid & bt_ready);
//   if_pc/if_valid   the PC core i is about to fetch; stall asks the core to
//               insert NOPs while the array runs; wb_valid/wb_pc/arr_rf
//               return the updated register file and the resume PC;
//   proc_rf     core i's register file, copied into the array at the start;
//   prio        thread priority of core i for PE lending;
//   mem_*       per-column load/store ports towards core i's L1 data cache.
// Statistic outputs flag PE lending, deferred operations, saved
// configurations, cache evictions and the reasons configurations ended.
// The controllers' active flags and the scheduler's AT/RT contents are
// observation outputs for the lower-level tests and are left open here.
module rca_top
  import rca_pkg::*;
(
  input  logic                                     clk,
  input  logic                                     rst_n,
  // instruction streams into the binary translators
  input  logic   [NCORES-1:0]                      bt_valid,
  input  logic   [NCORES-1:0][XLEN-1:0]            bt_pc,
  input  logic   [NCORES-1:0][31:0]                bt_instr,
  output logic   [NCORES-1:0]                      bt_ready,
  // fetch side of the cores
  input  logic   [NCORES-1:0][XLEN-1:0]            if_pc,
  input  logic   [NCORES-1:0]                      if_valid,
  output logic   [NCORES-1:0]                      stall,
  output logic   [NCORES-1:0]                      wb_valid,
  output logic   [NCORES-1:0][XLEN-1:0]            wb_pc,
  input  logic   [NCORES-1:0][NREG-1:0][XLEN-1:0]  proc_rf,
  output logic   [NCORES-1:0][NREG-1:0][XLEN-1:0]  arr_rf,
  input  logic   [NCORES-1:0][PRIO_W-1:0]          prio,
  // memory ports of the load/store units
  output logic   [NCORES-1:0]                      mem_req,
  output logic   [NCORES-1:0]                      mem_we,
  output logic   [NCORES-1:0][XLEN-1:0]            mem_addr,
  output logic   [NCORES-1:0][XLEN-1:0]            mem_wdata,
  input  logic   [NCORES-1:0]                      mem_gnt,
  input  logic   [NCORES-1:0][XLEN-1:0]            mem_rdata,
  // statistics
  output logic   [NCORES-1:0]                      st_lent,
  output logic   [NCORES-1:0]                      st_deferred,
  output logic   [NCORES-1:0]                      st_cfg_saved,
  output logic   [NCORES-1:0]                      st_evict,
  output logic   [NCORES-1:0][3:0]                 st_end       // branch, unsupported, resource, discontinuity
);

  localparam int unsigned IW = $clog2(NCONF);
  localparam int unsigned WW = $clog2(NWORDS);

  logic   [NCORES-1:0]                 arr_valid, arr_ready, arr_busy, rf_load;
  cword_t [NCORES-1:0]                 arr_word;

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    chdr_t                cfg_hdr, lk_hdr;
    cword_t [NWORDS-1:0]  cfg_words;
    cword_t               rd_data;
    logic                 cfg_valid, lk_hit, use_valid;
    logic [XLEN-1:0]      lk_pc;
    logic [IW-1:0]        lk_idx, use_idx, rd_idx;
    logic [WW-1:0]        rd_word;

    binary_translator u_bt (
      .clk, .rst_n,
      .in_valid(bt_valid[i]), .in_pc(bt_pc[i]), .in_instr(bt_instr[i]), .in_ready(bt_ready[i]),
      .cfg_valid, .cfg_hdr, .cfg_words,
      .end_branch(st_end[i][0]), .end_unsupported(st_end[i][1]),
      .end_resource(st_end[i][2]), .end_discontinuity(st_end[i][3])
    );

    config_cache u_cc (
      .clk, .rst_n,
      .lk_pc, .lk_hit, .lk_idx, .lk_hdr,
      .use_valid, .use_idx,
      .rd_idx, .rd_word, .rd_data,
      .wr_valid(cfg_valid), .wr_hdr(cfg_hdr), .wr_words(cfg_words),
      .evict(st_evict[i])
    );

    config_controller u_ctl (
      .clk, .rst_n,
      .if_pc(if_pc[i]), .if_valid(if_valid[i]), .stall(stall[i]),
      .wb_valid(wb_valid[i]), .wb_pc(wb_pc[i]), .active(),
      .lk_pc, .lk_hit, .lk_idx, .lk_hdr, .use_valid, .use_idx,
      .rd_idx, .rd_word, .rd_data,
      .rf_load(rf_load[i]), .arr_valid(arr_valid[i]), .arr_word(arr_word[i]),
      .arr_ready(arr_ready[i]), .arr_busy(arr_busy[i])
    );

    assign st_cfg_saved[i] = cfg_valid;
  end

  reconfig_array u_array (
    .clk, .rst_n,
    .in_valid(arr_valid), .in_word(arr_word), .in_ready(arr_ready),
    .prio, .busy(arr_busy),
    .rf_load, .rf_load_data(proc_rf), .rf_regs(arr_rf),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rdata,
    .lent(st_lent), .deferred(st_deferred), .at_tab(), .rt_tab()
  );

endmodule
