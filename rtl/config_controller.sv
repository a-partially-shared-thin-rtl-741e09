// config_controller: decides, from the program counter, whether code runs on
// the core or on the reconfigurable array, and drives a configuration run.
//
// Every cycle the PC the core is about to fetch (if_pc, if_valid) is looked
// up in the core's configuration cache. On a hit the controller stalls the
// core (stall, which makes the core's fetch stage insert NOPs), copies the
// core's register file into the core's array register file (rf_load, in the
// hit cycle), then feeds the configuration's words one by one to the
// scheduler (arr_valid/arr_ready). After the last word has been accepted it
// waits until the scheduler holds no word of this core (arr_busy low), so the
// last results are written, and then pulses wb_valid for one cycle: the core
// copies the array register file back and resumes at wb_pc, the address
// after the code the configuration covers. The hit also counts as a use of
// the cache entry for its replacement policy.
// Timing: a configuration of N words keeps the core stalled for N+3 cycles
// when the scheduler never defers an operation (hit cycle, N issue cycles,
// one cycle for the last word to execute, the write-back cycle).
// From the document: the PC-based decision, the NOP insertion, the context
// copy in and out. The state machine and its handshakes are this design's.
module config_controller
  import rca_pkg::*;
#(
  parameter int unsigned ENTRIES = NCONF,
  parameter int unsigned WORDS   = NWORDS,
  localparam int unsigned IW     = $clog2(ENTRIES),
  localparam int unsigned WW     = $clog2(WORDS)
)(
  input  logic                        clk,
  input  logic                        rst_n,
  // core side
  input  logic [XLEN-1:0]             if_pc,
  input  logic                        if_valid,
  output logic                        stall,
  output logic                        wb_valid,
  output logic [XLEN-1:0]             wb_pc,
  output logic                        active,     // a configuration is running
  // configuration cache
  output logic [XLEN-1:0]             lk_pc,
  input  logic                        lk_hit,
  input  logic [IW-1:0]               lk_idx,
  input  chdr_t                       lk_hdr,
  output logic                        use_valid,
  output logic [IW-1:0]               use_idx,
  output logic [IW-1:0]               rd_idx,
  output logic [WW-1:0]               rd_word,
  input  cword_t                      rd_data,
  // reconfigurable array
  output logic                        rf_load,
  output logic                        arr_valid,
  output cword_t                      arr_word,
  input  logic                        arr_ready,
  input  logic                        arr_busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e          state_q;
  logic [IW-1:0]   idx_q;
  logic [WW-1:0]   ctr_q;
  logic [4:0]      nwords_q;
  logic [XLEN-1:0] next_pc_q;
  logic            start;

  assign lk_pc     = if_pc;
  assign start     = (state_q == S_IDLE) && if_valid && lk_hit;
  assign stall     = (state_q != S_IDLE) || start;
  assign active    = (state_q != S_IDLE);
  assign rf_load   = start;
  assign use_valid = start;
  assign use_idx   = lk_idx;
  assign rd_idx    = idx_q;
  assign rd_word   = ctr_q;
  assign arr_valid = (state_q == S_RUN);
  assign arr_word  = rd_data;
  assign wb_valid  = (state_q == S_DRAIN) && !arr_busy;
  assign wb_pc     = next_pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      idx_q     <= '0;
      ctr_q     <= '0;
      nwords_q  <= '0;
      next_pc_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q   <= S_RUN;
          idx_q     <= lk_idx;
          ctr_q     <= '0;
          nwords_q  <= lk_hdr.nwords;
          next_pc_q <= lk_hdr.next_pc;
        end
        S_RUN: if (arr_ready) begin
          if (5'(ctr_q) + 5'd1 >= nwords_q) state_q <= S_DRAIN;
          else                              ctr_q   <= ctr_q + 1'b1;
        end
        S_DRAIN: if (!arr_busy) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
