// reconfig_array: the partially shared thin reconfigurable array.
//
// Four thin columns (three PEs and one load/store unit each), four 32-entry
// array register files (one per core, 10 read and 5 write ports), the
// configuration scheduler and the routing multiplexers between them.
// Use by core i: pulse rf_load[i] with the core's register file to copy in
// the input context; present configuration words with in_valid/in_ready (a
// word is taken in a cycle where both are high, executes in the next cycle,
// and its results are in the register file from the cycle after); wait until
// busy[i] is low after the last word; read the final context from rf_regs[i].
// Memory operations leave through the per-column memory ports (request and
// grant in the same cycle; no grant stalls only that core's word).
// Structure from the document; the timing and interfaces are this design's.
module reconfig_array
  import rca_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic   [NCORES-1:0]                   in_valid,
  input  cword_t [NCORES-1:0]                   in_word,
  output logic   [NCORES-1:0]                   in_ready,
  input  logic   [NCORES-1:0][PRIO_W-1:0]       prio,
  output logic   [NCORES-1:0]                   busy,
  input  logic   [NCORES-1:0]                   rf_load,
  input  logic   [NCORES-1:0][NREG-1:0][XLEN-1:0] rf_load_data,
  output logic   [NCORES-1:0][NREG-1:0][XLEN-1:0] rf_regs,
  // per-column memory ports towards the L1 data caches
  output logic   [NCORES-1:0]                   mem_req,
  output logic   [NCORES-1:0]                   mem_we,
  output logic   [NCORES-1:0][XLEN-1:0]         mem_addr,
  output logic   [NCORES-1:0][XLEN-1:0]         mem_wdata,
  input  logic   [NCORES-1:0]                   mem_gnt,
  input  logic   [NCORES-1:0][XLEN-1:0]         mem_rdata,
  // activity, for statistics
  output logic   [NCORES-1:0]                   lent,
  output logic   [NCORES-1:0]                   deferred,
  output logic   [NCORES-1:0][NPE-1:0]          at_tab,
  output logic   [NCORES-1:0][1:0]              rt_tab
);

  cword_t  [NCORES-1:0]                    cur_word;
  pe_ctl_t [NCORES-1:0][NPE-1:0]           pe_ctl;
  exec_t   [NCORES-1:0][NSLOT-1:0]         exec;
  logic    [NCORES-1:0]                    lsu_en, lsu_done, lsu_store;
  logic    [NCORES-1:0][2:0]               lsu_slot;
  logic    [NCORES-1:0][NRD-1:0][4:0]      rf_raddr;
  logic    [NCORES-1:0][NRD-1:0][XLEN-1:0] rf_rdata;
  logic    [NCORES-1:0][NWR-1:0]           rf_wen;
  logic    [NCORES-1:0][NWR-1:0][4:0]      rf_waddr;
  logic    [NCORES-1:0][NWR-1:0][XLEN-1:0] rf_wdata;
  logic    [NCORES-1:0][NPE-1:0][XLEN-1:0] pe_a, pe_b, pe_y;
  alu_op_e [NCORES-1:0][NPE-1:0]           pe_op;
  logic    [NCORES-1:0][XLEN-1:0]          lsu_base, lsu_offset, lsu_sdata, lsu_ldata;

  config_scheduler u_sched (
    .clk, .rst_n, .in_valid, .in_word, .in_ready, .prio,
    .cur_word, .pe_ctl, .exec, .lsu_en, .lsu_slot, .lsu_done,
    .busy, .at_tab, .rt_tab, .lent, .deferred
  );

  operand_router u_route (
    .cur_word, .pe_ctl, .exec, .lsu_slot,
    .rf_raddr, .rf_rdata, .rf_wen, .rf_waddr, .rf_wdata,
    .pe_a, .pe_b, .pe_y,
    .lsu_base, .lsu_offset, .lsu_sdata, .lsu_store, .lsu_ldata
  );

  for (genvar i = 0; i < NCORES; i++) begin : g_col
    for (genvar p = 0; p < NPE; p++) begin : g_op
      assign pe_op[i][p] = pe_ctl[i][p].op;
    end

    array_regfile u_rf (
      .clk, .rst_n,
      .load(rf_load[i]), .load_data(rf_load_data[i]),
      .raddr(rf_raddr[i]), .rdata(rf_rdata[i]),
      .wen(rf_wen[i]), .waddr(rf_waddr[i]), .wdata(rf_wdata[i]),
      .regs(rf_regs[i])
    );

    recon_column u_col (
      .pe_op(pe_op[i]), .pe_a(pe_a[i]), .pe_b(pe_b[i]), .pe_y(pe_y[i]),
      .lsu_en(lsu_en[i]), .lsu_store(lsu_store[i]), .lsu_base(lsu_base[i]),
      .lsu_offset(lsu_offset[i]), .lsu_sdata(lsu_sdata[i]),
      .lsu_done(lsu_done[i]), .lsu_ldata(lsu_ldata[i]),
      .mem_req(mem_req[i]), .mem_we(mem_we[i]), .mem_addr(mem_addr[i]),
      .mem_wdata(mem_wdata[i]), .mem_gnt(mem_gnt[i]), .mem_rdata(mem_rdata[i])
    );
  end

endmodule
