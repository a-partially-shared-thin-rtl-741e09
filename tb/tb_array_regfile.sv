// tb_array_regfile: self-checking test of an array register file.
// Random cycles of whole-file loads (context copy-in) and up to five writes
// to distinct registers, with all ten read ports reading random registers;
// every read port and the copy-out view are compared with a model array.
// Register 0 must stay zero.
module tb_array_regfile;
  import rca_pkg::*;

  logic clk = 0, rst_n = 0, load;
  logic [NREG-1:0][XLEN-1:0] load_data, regs;
  logic [NRD-1:0][4:0]       raddr;
  logic [NRD-1:0][XLEN-1:0]  rdata;
  logic [NWR-1:0]            wen;
  logic [NWR-1:0][4:0]       waddr;
  logic [NWR-1:0][XLEN-1:0]  wdata;

  array_regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  logic [XLEN-1:0] model [NREG];

  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; wen = '0; waddr = '0; wdata = '0; raddr = '0; load_data = '0;
    for (int r = 0; r < NREG; r++) model[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check reads of the current state
      for (int p = 0; p < NRD; p++) raddr[p] = 5'($urandom);
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          $display("FAIL read port %0d reg %0d got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      checks++;
      for (int r = 0; r < NREG; r++) if (regs[r] !== model[r]) begin
        failures++; $display("FAIL copy-out reg %0d", r); break;
      end
      // next operation
      load = ($urandom_range(0, 19) == 0);
      for (int r = 0; r < NREG; r++) load_data[r] = $urandom;
      begin
        logic [31:0] taken = 0;
        for (int p = 0; p < NWR; p++) begin
          logic [4:0] a;
          do a = 5'($urandom); while (taken[a] && a != 0);
          taken[a] = 1;
          waddr[p] = a;
          wen[p]   = $urandom_range(0, 3) != 0;
          wdata[p] = $urandom;
        end
      end
      @(posedge clk);
      if (load) begin
        for (int r = 1; r < NREG; r++) model[r] = load_data[r];
      end else begin
        for (int p = 0; p < NWR; p++) if (wen[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
