// operand_router: the multiplexers between the four array register files and
// the four reconfigurable columns.
//
// Read side: each core's register file has two read ports per slot of the
// core's current configuration word (ports 2s and 2s+1 read ra and rb of slot
// s). Each PE, told by the scheduler which core owns it this cycle and which
// slot it executes, selects that core's pair of ports; operand b is the slot's
// immediate when b_imm is set. A load/store unit only serves its own core.
// Write side: each write port s of a core's register file takes the result of
// whichever PE (possibly in another column) or load/store unit executed slot
// s of that core this cycle, so a lent PE's result lands in the register file
// of the core that requested it. Purely combinational.
// The document shows the source routing multiplexers and states that output
// multiplexers also exist; the port-to-slot assignment is this design's choice.
module operand_router
  import rca_pkg::*;
(
  input  cword_t  [NCORES-1:0]                     cur_word,
  input  pe_ctl_t [NCORES-1:0][NPE-1:0]            pe_ctl,
  input  exec_t   [NCORES-1:0][NSLOT-1:0]          exec,
  input  logic    [NCORES-1:0][2:0]                lsu_slot,
  // register files
  output logic    [NCORES-1:0][NRD-1:0][4:0]       rf_raddr,
  input  logic    [NCORES-1:0][NRD-1:0][XLEN-1:0]  rf_rdata,
  output logic    [NCORES-1:0][NWR-1:0]            rf_wen,
  output logic    [NCORES-1:0][NWR-1:0][4:0]       rf_waddr,
  output logic    [NCORES-1:0][NWR-1:0][XLEN-1:0]  rf_wdata,
  // columns
  output logic    [NCORES-1:0][NPE-1:0][XLEN-1:0]  pe_a,
  output logic    [NCORES-1:0][NPE-1:0][XLEN-1:0]  pe_b,
  input  logic    [NCORES-1:0][NPE-1:0][XLEN-1:0]  pe_y,
  output logic    [NCORES-1:0][XLEN-1:0]           lsu_base,
  output logic    [NCORES-1:0][XLEN-1:0]           lsu_offset,
  output logic    [NCORES-1:0][XLEN-1:0]           lsu_sdata,
  output logic    [NCORES-1:0]                     lsu_store,
  input  logic    [NCORES-1:0][XLEN-1:0]           lsu_ldata
);

  always_comb begin
    for (int i = 0; i < NCORES; i++) begin
      for (int s = 0; s < NSLOT; s++) begin
        rf_raddr[i][2*s]   = cur_word[i][s].ra;
        rf_raddr[i][2*s+1] = cur_word[i][s].rb;
      end
    end
    for (int j = 0; j < NCORES; j++) begin
      for (int p = 0; p < NPE; p++) begin
        automatic int o = int'(pe_ctl[j][p].owner);
        automatic int s = int'(pe_ctl[j][p].slot);
        pe_a[j][p] = rf_rdata[o][2*s];
        pe_b[j][p] = pe_ctl[j][p].b_imm ? pe_ctl[j][p].imm : rf_rdata[o][2*s+1];
      end
      begin
        automatic int s = int'(lsu_slot[j]);
        lsu_base[j]   = rf_rdata[j][2*s];
        lsu_sdata[j]  = rf_rdata[j][2*s+1];
        lsu_offset[j] = cur_word[j][s].imm;
        lsu_store[j]  = cur_word[j][s].is_store;
      end
    end
    for (int i = 0; i < NCORES; i++) begin
      for (int s = 0; s < NSLOT; s++) begin
        automatic slot_t sl = cur_word[i][s];
        automatic exec_t e  = exec[i][s];
        rf_wen[i][s]   = e.go && sl.valid && !(sl.is_mem && sl.is_store) && sl.rd != 5'd0;
        rf_waddr[i][s] = sl.rd;
        rf_wdata[i][s] = (e.pe == EXEC_LSU) ? lsu_ldata[i] : pe_y[e.col][e.pe];
      end
    end
  end

endmodule
