// tb_operand_router: self-checking test of the routing multiplexers.
// Random configuration words, PE assignments (owner core, slot), execution
// records and register-file read data; checks the read addresses of each
// register file, the operands every PE receives (including immediates and
// PEs lent to another core), the load/store operands, and that each write
// port takes the result of the PE or load/store unit that ran its slot.
module tb_operand_router;
  import rca_pkg::*;

  cword_t  [NCORES-1:0]                     cur_word;
  pe_ctl_t [NCORES-1:0][NPE-1:0]            pe_ctl;
  exec_t   [NCORES-1:0][NSLOT-1:0]          exec;
  logic    [NCORES-1:0][2:0]                lsu_slot;
  logic    [NCORES-1:0][NRD-1:0][4:0]       rf_raddr;
  logic    [NCORES-1:0][NRD-1:0][XLEN-1:0]  rf_rdata;
  logic    [NCORES-1:0][NWR-1:0]            rf_wen;
  logic    [NCORES-1:0][NWR-1:0][4:0]       rf_waddr;
  logic    [NCORES-1:0][NWR-1:0][XLEN-1:0]  rf_wdata;
  logic    [NCORES-1:0][NPE-1:0][XLEN-1:0]  pe_a, pe_b, pe_y;
  logic    [NCORES-1:0][XLEN-1:0]           lsu_base, lsu_offset, lsu_sdata, lsu_ldata;
  logic    [NCORES-1:0]                     lsu_store;

  operand_router dut (.*);

  int checks = 0, failures = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < NCORES; i++) begin
        for (int s = 0; s < NSLOT; s++) begin
          cur_word[i][s].valid    = $urandom_range(0, 4) != 0;
          cur_word[i][s].is_mem   = $urandom_range(0, 4) == 0;
          cur_word[i][s].is_store = $urandom_range(0, 1) == 1;
          cur_word[i][s].op       = alu_op_e'($urandom_range(0, 11));
          cur_word[i][s].rd       = 5'($urandom);
          cur_word[i][s].ra       = 5'($urandom);
          cur_word[i][s].rb       = 5'($urandom);
          cur_word[i][s].b_imm    = $urandom_range(0, 1) == 1;
          cur_word[i][s].imm      = $urandom;
          exec[i][s].go  = $urandom_range(0, 2) != 0;
          exec[i][s].col = 2'($urandom);
          exec[i][s].pe  = 2'($urandom);
        end
        for (int r = 0; r < NRD; r++) rf_rdata[i][r] = $urandom;
        for (int p = 0; p < NPE; p++) begin
          pe_ctl[i][p].valid = 1'b1;
          pe_ctl[i][p].owner = 2'($urandom);
          pe_ctl[i][p].slot  = 3'($urandom_range(0, NSLOT - 1));
          pe_ctl[i][p].op    = OP_ADD;
          pe_ctl[i][p].b_imm = $urandom_range(0, 1) == 1;
          pe_ctl[i][p].imm   = $urandom;
          pe_y[i][p]         = $urandom;
        end
        lsu_slot[i]  = 3'($urandom_range(0, NSLOT - 1));
        lsu_ldata[i] = $urandom;
      end
      #1;
      for (int i = 0; i < NCORES; i++) begin
        for (int s = 0; s < NSLOT; s++) begin
          slot_t sl;
          logic [31:0] expd;
          sl = cur_word[i][s];
          check(rf_raddr[i][2*s] == sl.ra && rf_raddr[i][2*s+1] == sl.rb, "read address");
          check(rf_wen[i][s] == (exec[i][s].go && sl.valid && !(sl.is_mem && sl.is_store) && sl.rd != 0), "write enable");
          check(rf_waddr[i][s] == sl.rd, "write address");
          expd = (exec[i][s].pe == 3) ? lsu_ldata[i] : pe_y[exec[i][s].col][exec[i][s].pe];
          if (rf_wen[i][s]) check(rf_wdata[i][s] == expd, $sformatf("write data core %0d slot %0d", i, s));
        end
        for (int p = 0; p < NPE; p++) begin
          int o, s;
          o = pe_ctl[i][p].owner; s = pe_ctl[i][p].slot;
          check(pe_a[i][p] == rf_rdata[o][2*s], $sformatf("operand a col %0d pe %0d", i, p));
          check(pe_b[i][p] == (pe_ctl[i][p].b_imm ? pe_ctl[i][p].imm : rf_rdata[o][2*s+1]),
                $sformatf("operand b col %0d pe %0d", i, p));
        end
        check(lsu_base[i]   == rf_rdata[i][2*lsu_slot[i]], "lsu base");
        check(lsu_sdata[i]  == rf_rdata[i][2*lsu_slot[i]+1], "lsu store data");
        check(lsu_offset[i] == cur_word[i][lsu_slot[i]].imm, "lsu offset");
        check(lsu_store[i]  == cur_word[i][lsu_slot[i]].is_store, "lsu store flag");
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
