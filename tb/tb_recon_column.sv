// tb_recon_column: self-checking test of one reconfigurable column.
// Drives random operations and operands into the three PEs and compares each
// result with a reference computed here; drives random load and store
// operations into the load/store unit with a memory grant that is sometimes
// withheld, and checks address, write data, completion and load data.
module tb_recon_column;
  import rca_pkg::*;

  alu_op_e [NPE-1:0]           pe_op;
  logic    [NPE-1:0][XLEN-1:0] pe_a, pe_b, pe_y;
  logic            lsu_en, lsu_store, lsu_done, mem_req, mem_we, mem_gnt;
  logic [XLEN-1:0] lsu_base, lsu_offset, lsu_sdata, lsu_ldata, mem_addr, mem_wdata, mem_rdata;

  recon_column dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [31:0] ref_alu(int op, logic [31:0] a, logic [31:0] b);
    longint sa, sb;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    if (op == 0) return a + b;
    if (op == 1) return a - b;
    if (op == 2) return a & b;
    if (op == 3) return a | b;
    if (op == 4) return a ^ b;
    if (op == 5) return ~(a | b);
    if (op == 6) return (sa < sb) ? 32'd1 : 32'd0;
    if (op == 7) return ({1'b0, a} < {1'b0, b}) ? 32'd1 : 32'd0;
    if (op == 8) return a << (b % 32);
    if (op == 9) return a >> (b % 32);
    if (op == 10) begin
      logic [31:0] r = a;
      for (int k = 0; k < int'(b % 32); k++) r = {r[31], r[31:1]};
      return r;
    end
    return b * 65536;  // LUI
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sp[4];
    sp[0] = 32'h8000_0000; sp[1] = 32'h7fff_ffff; sp[2] = 32'hffff_ffff; sp[3] = 0;
    for (int n = 0; n < 3000; n++) begin
      for (int p = 0; p < NPE; p++) begin
        pe_op[p] = alu_op_e'($urandom_range(0, 11));
        pe_a[p]  = ($urandom_range(0, 3) == 0) ? sp[$urandom_range(0, 3)] : $urandom;
        pe_b[p]  = ($urandom_range(0, 3) == 0) ? sp[$urandom_range(0, 3)] : $urandom;
      end
      lsu_en     = $urandom_range(0, 1) == 1;
      lsu_store  = $urandom_range(0, 1) == 1;
      lsu_base   = $urandom;
      lsu_offset = {{16{1'b0}}, 16'($urandom)} - 32'd32768;
      lsu_sdata  = $urandom;
      mem_gnt    = $urandom_range(0, 2) != 0;
      mem_rdata  = $urandom;
      #1;
      for (int p = 0; p < NPE; p++)
        check(pe_y[p] == ref_alu(int'(pe_op[p]), pe_a[p], pe_b[p]),
              $sformatf("pe%0d op %0d a=%h b=%h y=%h", p, pe_op[p], pe_a[p], pe_b[p], pe_y[p]));
      check(mem_req == lsu_en, "mem_req");
      check(mem_we == (lsu_en && lsu_store), "mem_we");
      if (lsu_en) begin
        check(mem_addr == lsu_base + lsu_offset, "mem_addr");
        if (lsu_store) check(mem_wdata == lsu_sdata, "mem_wdata");
        if (!lsu_store && mem_gnt) check(lsu_ldata == mem_rdata, "load data");
      end
      check(lsu_done == (lsu_en && mem_gnt), "lsu_done");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
