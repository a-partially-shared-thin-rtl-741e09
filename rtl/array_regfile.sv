// array_regfile: the register file of the reconfigurable array that belongs to
// one processing core.
//
// At the start of a configuration it receives, in one cycle (load), a copy of
// the core's register file, its input context. While the configuration runs,
// every operation of the core reads its operands from here and writes its
// result back here, through NRD asynchronous read ports and NWR write ports
// (two read ports and one write port per slot of a configuration word). At the
// end the whole contents (regs) are copied back to the core.
// Following the document: 32 entries, 10 read and 5 write ports, whole-file
// copy in and out. This design's choices: register 0 always reads as zero and
// ignores writes (MIPS $zero); a load has priority over port writes; if two
// ports write the same register in a cycle, the higher port wins (the binary
// translator never produces that case).
module array_regfile
  import rca_pkg::*;
#(
  parameter int unsigned ENTRIES = NREG,
  parameter int unsigned RPORTS  = NRD,
  parameter int unsigned WPORTS  = NWR,
  localparam int unsigned AW     = $clog2(ENTRIES)
)(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          load,
  input  logic [ENTRIES-1:0][XLEN-1:0]  load_data,
  input  logic [RPORTS-1:0][AW-1:0]     raddr,
  output logic [RPORTS-1:0][XLEN-1:0]   rdata,
  input  logic [WPORTS-1:0]             wen,
  input  logic [WPORTS-1:0][AW-1:0]     waddr,
  input  logic [WPORTS-1:0][XLEN-1:0]   wdata,
  output logic [ENTRIES-1:0][XLEN-1:0]  regs
);

  logic [ENTRIES-1:0][XLEN-1:0] r_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q <= '0;
    end else if (load) begin
      r_q    <= load_data;
      r_q[0] <= '0;
    end else begin
      for (int p = 0; p < WPORTS; p++)
        if (wen[p] && waddr[p] != '0)
          r_q[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < RPORTS; p++)
      rdata[p] = r_q[raddr[p]];

  assign regs = r_q;

endmodule
