// lsu: the load/store unit of one reconfigurable column.
//
// It executes the single memory operation a configuration word may hold for
// the column's own core: the address is R[ra] + imm, a store writes R[rb], a
// load returns the word read. It talks to the core's L1 data cache through a
// simple combinational request/grant port: mem_req, mem_we, mem_addr and
// mem_wdata are driven during the cycle, and the operation completes in the
// cycle mem_gnt is high, with mem_rdata valid in that same cycle. Without a
// grant the operation stays pending and is retried in the next cycle, so a
// slow memory stalls only the word of its own core.
// The document gives one load/store unit per column and that it is not lent to
// other cores; the port protocol and addressing are this design's choice
// (word accesses only).
module lsu
  import rca_pkg::*;
(
  input  logic            en,        // a memory operation is pending this cycle
  input  logic            is_store,
  input  logic [XLEN-1:0] base,      // R[ra]
  input  logic [XLEN-1:0] offset,    // sign-extended immediate
  input  logic [XLEN-1:0] sdata,     // R[rb]
  output logic            done,      // operation completes this cycle
  output logic [XLEN-1:0] ldata,     // load result, valid with done
  // memory port
  output logic            mem_req,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  input  logic            mem_gnt,
  input  logic [XLEN-1:0] mem_rdata
);

  always_comb begin
    mem_req   = en;
    mem_we    = en & is_store;
    mem_addr  = base + offset;
    mem_wdata = sdata;
    done      = en & mem_gnt;
    ldata     = mem_rdata;
  end

endmodule
