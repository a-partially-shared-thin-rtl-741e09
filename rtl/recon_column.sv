// recon_column: one thin reconfigurable column, three PEs and one load/store
// unit.
//
// The column has no state of its own: each cycle the scheduler gives each PE
// an operation (from the column's own core or, when lent, from another core)
// and the operand router feeds it; the load/store unit executes the memory
// operation of the column's own core. Results leave combinationally and are
// written to the register files at the end of the cycle.
// From the document: three PEs and one load/store unit per column. PE and
// load/store unit details are described in pe and lsu.
module recon_column
  import rca_pkg::*;
(
  input  alu_op_e [NPE-1:0]             pe_op,
  input  logic    [NPE-1:0][XLEN-1:0]   pe_a,
  input  logic    [NPE-1:0][XLEN-1:0]   pe_b,
  output logic    [NPE-1:0][XLEN-1:0]   pe_y,
  input  logic                          lsu_en,
  input  logic                          lsu_store,
  input  logic    [XLEN-1:0]            lsu_base,
  input  logic    [XLEN-1:0]            lsu_offset,
  input  logic    [XLEN-1:0]            lsu_sdata,
  output logic                          lsu_done,
  output logic    [XLEN-1:0]            lsu_ldata,
  output logic                          mem_req,
  output logic                          mem_we,
  output logic    [XLEN-1:0]            mem_addr,
  output logic    [XLEN-1:0]            mem_wdata,
  input  logic                          mem_gnt,
  input  logic    [XLEN-1:0]            mem_rdata
);

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe u_pe (.op(pe_op[p]), .a(pe_a[p]), .b(pe_b[p]), .y(pe_y[p]));
  end

  lsu u_lsu (
    .en(lsu_en), .is_store(lsu_store), .base(lsu_base), .offset(lsu_offset),
    .sdata(lsu_sdata), .done(lsu_done), .ldata(lsu_ldata),
    .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_gnt(mem_gnt), .mem_rdata(mem_rdata)
  );

endmodule
