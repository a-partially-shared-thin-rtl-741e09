// config_scheduler: maps the configuration words of the four cores onto the
// four thin reconfigurable columns, lending idle PEs between columns.
//
// A configuration word holds up to five operations (slots), as if each column
// had five PEs, but a column has only three. The scheduler is a two-stage
// pipeline:
//  * CD (configuration decode), a register stage per core. When a core's word
//    is accepted its pending ALU operations are decoded by the basic priority
//    rule: the first three go to the core's own column and set bits of the
//    allocation table entry AT[i] (3 bits, one per PE of column i); the rest,
//    at most two, set bits of the request table entry RT[i] (2 bits).
//  * RA (resource allocation), combinational in the following cycle. Every PE
//    marked in AT receives the configuration bits of its own core. Every RT
//    request searches the other columns for a PE that no AT bit marks (idle);
//    a found PE receives the requested operation plus routing bits that tell
//    it to read from and write to the requesting core's register file. Cores
//    are served by descending thread priority (prio), ties by core index, and
//    core i searches columns i+1, i+2, i+3 (mod 4), PEs 0..2, in that order.
//    A request that finds no idle PE stays pending and runs in the next cycle
//    in the core's own column. The core's memory operation goes to its own
//    column's load/store unit and stays pending until memory grants it.
// Operations of one word are independent (the binary translator guarantees
// that no operation writes a register another operation of the same word
// reads or writes), so the operations of a word may complete over several
// cycles without changing the result. A new word is accepted (in_ready) in
// the cycle the last pending operation of the current word executes, so a
// core runs one word per cycle when nothing is deferred: a word presented in
// cycle t executes in cycle t+1 and its results are written at the end of it.
// From the document: two stages named CD and RA, the 4x3-bit AT and 4x2-bit RT,
// the basic priority rule, the thread priority rule, the search for idle PEs in
// other columns and deferral to the next cycle. The search order, the
// tie-breaking, the handshake and the per-slot completion tracking are this
// design's choices.
module config_scheduler
  import rca_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  // configuration words from the four cores' configuration controllers
  input  logic   [NCORES-1:0]                  in_valid,
  input  cword_t [NCORES-1:0]                  in_word,
  output logic   [NCORES-1:0]                  in_ready,
  input  logic   [NCORES-1:0][PRIO_W-1:0]      prio,
  // RA stage outputs to the columns and the routing multiplexers
  output cword_t [NCORES-1:0]                  cur_word,   // word in RA, per core
  output pe_ctl_t [NCORES-1:0][NPE-1:0]        pe_ctl,     // per column, per PE
  output exec_t  [NCORES-1:0][NSLOT-1:0]       exec,       // per core, per slot
  output logic   [NCORES-1:0]                  lsu_en,     // per column
  output logic   [NCORES-1:0][2:0]             lsu_slot,
  input  logic   [NCORES-1:0]                  lsu_done,   // memory granted
  // status
  output logic   [NCORES-1:0]                  busy,       // a word is in RA
  output logic   [NCORES-1:0][NPE-1:0]         at_tab,     // allocation table
  output logic   [NCORES-1:0][1:0]             rt_tab,     // request table
  output logic   [NCORES-1:0]                  lent,       // core got a borrowed PE
  output logic   [NCORES-1:0]                  deferred    // a request found no idle PE
);

  typedef struct packed {
    logic [NPE-1:0]        at;
    logic [1:0]            rt;
    logic [NPE-1:0][2:0]   at_slot;
    logic [1:0][2:0]       rt_slot;
  } dec_t;

  function automatic dec_t decode(cword_t w, logic [NSLOT-1:0] pend);
    dec_t d;
    int   n;
    d = '0;
    n = 0;
    for (int k = 0; k < NSLOT; k++) begin
      if (pend[k] && w[k].valid && !w[k].is_mem) begin
        if (n < NPE) begin
          d.at[n]      = 1'b1;
          d.at_slot[n] = 3'(k);
        end else if (n < NPE + 2) begin
          d.rt[n-NPE]      = 1'b1;
          d.rt_slot[n-NPE] = 3'(k);
        end
        n++;
      end
    end
    return d;
  endfunction

  function automatic logic [NSLOT-1:0] valid_mask(cword_t w);
    logic [NSLOT-1:0] m;
    for (int k = 0; k < NSLOT; k++) m[k] = w[k].valid;
    return m;
  endfunction

  // CD stage registers
  logic   [NCORES-1:0]            cd_valid;
  cword_t [NCORES-1:0]            cd_word;
  logic   [NCORES-1:0][NSLOT-1:0] cd_pend;
  dec_t   [NCORES-1:0]            cd_dec;

  // RA stage
  logic [NCORES-1:0][NPE-1:0]   idle;

  // memory operation of each core: its own column's load/store unit
  always_comb begin
    lsu_en   = '0;
    lsu_slot = '0;
    for (int i = 0; i < NCORES; i++)
      for (int k = NSLOT-1; k >= 0; k--)
        if (cd_valid[i] && cd_pend[i][k] && cd_word[i][k].valid && cd_word[i][k].is_mem) begin
          lsu_en[i]   = 1'b1;
          lsu_slot[i] = 3'(k);
        end
  end
  logic [NCORES-1:0][NSLOT-1:0] left;

  always_comb begin
    pe_ctl   = '0;
    exec     = '0;
    lent     = '0;
    deferred = '0;
    idle     = '1;
    // basic priority rule: own column
    for (int i = 0; i < NCORES; i++) begin
      for (int p = 0; p < NPE; p++) begin
        if (cd_valid[i] && cd_dec[i].at[p]) begin
          automatic int s = int'(cd_dec[i].at_slot[p]);
          idle[i][p]         = 1'b0;
          pe_ctl[i][p].valid = 1'b1;
          pe_ctl[i][p].owner = 2'(i);
          pe_ctl[i][p].slot  = 3'(s);
          pe_ctl[i][p].op    = cd_word[i][s].op;
          pe_ctl[i][p].b_imm = cd_word[i][s].b_imm;
          pe_ctl[i][p].imm   = cd_word[i][s].imm;
          exec[i][s]         = '{go: 1'b1, col: 2'(i), pe: 2'(p)};
        end
      end
      if (lsu_en[i])
        exec[i][lsu_slot[i]] = '{go: lsu_done[i], col: 2'(i), pe: EXEC_LSU};
    end
    // lending: thread priority first, then core index
    for (int lvl = (1 << PRIO_W) - 1; lvl >= 0; lvl--) begin
      for (int i = 0; i < NCORES; i++) begin
        if (cd_valid[i] && int'(prio[i]) == lvl) begin
          for (int r = 0; r < 2; r++) begin
            if (cd_dec[i].rt[r]) begin
              automatic int  s     = int'(cd_dec[i].rt_slot[r]);
              automatic logic found = 1'b0;
              for (int d = 1; d < NCORES; d++) begin
                for (int p = 0; p < NPE; p++) begin
                  automatic int j = (i + d) % NCORES;
                  if (!found && idle[j][p]) begin
                    found              = 1'b1;
                    idle[j][p]         = 1'b0;
                    pe_ctl[j][p].valid = 1'b1;
                    pe_ctl[j][p].owner = 2'(i);
                    pe_ctl[j][p].slot  = 3'(s);
                    pe_ctl[j][p].op    = cd_word[i][s].op;
                    pe_ctl[j][p].b_imm = cd_word[i][s].b_imm;
                    pe_ctl[j][p].imm   = cd_word[i][s].imm;
                    exec[i][s]         = '{go: 1'b1, col: 2'(j), pe: 2'(p)};
                  end
                end
              end
              if (found) lent[i] = 1'b1;
              else       deferred[i] = 1'b1;
            end
          end
        end
      end
    end
    for (int i = 0; i < NCORES; i++) begin
      for (int k = 0; k < NSLOT; k++)
        left[i][k] = cd_pend[i][k] & ~exec[i][k].go;
      in_ready[i] = !cd_valid[i] || (left[i] == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cd_valid <= '0;
      cd_word  <= '0;
      cd_pend  <= '0;
      cd_dec   <= '0;
    end else begin
      for (int i = 0; i < NCORES; i++) begin
        if (in_ready[i]) begin
          cd_valid[i] <= in_valid[i];
          if (in_valid[i]) begin
            cd_word[i] <= in_word[i];
            cd_pend[i] <= valid_mask(in_word[i]);
            cd_dec[i]  <= decode(in_word[i], valid_mask(in_word[i]));
          end else begin
            cd_pend[i] <= '0;
            cd_dec[i]  <= '0;
          end
        end else begin
          cd_pend[i] <= left[i];
          cd_dec[i]  <= decode(cd_word[i], left[i]);
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NCORES; i++) begin
      cur_word[i] = cd_word[i];
      at_tab[i]   = cd_valid[i] ? cd_dec[i].at : '0;
      rt_tab[i]   = cd_valid[i] ? cd_dec[i].rt : '0;
    end
  end
  assign busy = cd_valid;

endmodule
