// Behavioural model of one Multibank DRAM memory module, for simulation only.
//
// It obeys the command bus of mompda_pkg: ACT opens a page in a bank, RD and
// WR run a burst of blen words from column col of the open page, PRE closes
// the bank, REF refreshes (all banks must be closed). Read data appear on
// rdata RD_LAT cycles after the RD command, one word per cycle; write data are
// taken from wdata in the blen cycles following the WR command. Storage is an
// associative array indexed by {bank, page, col}, so only touched words use
// memory. Protocol errors (access to a closed bank or another page, ACT to an
// open bank, REF with a bank open, two bursts needing the data bus in the same
// cycle) are counted in errors. Functions load and peek words directly.
module mdram_model
  import mompda_pkg::*;
#(
  parameter int unsigned RD_LAT = 3
) (
  input  logic       clk,
  input  mdram_cmd_t cmd,
  input  word_t      wdata,
  output word_t      rdata
);
  typedef logic [BANKW+PAGEW+COLW-1:0] addr_t;

  word_t                 mem [addr_t];
  logic [NBANKS-1:0]     open_q = '0;
  logic [PAGEW-1:0]      open_page [NBANKS];
  addr_t                 rd_at [longint];   // cycle -> address to drive
  addr_t                 wr_at [longint];   // cycle -> address to store
  longint                cyc = 0;
  int                    errors = 0;
  int                    n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0, n_ref = 0;
  logic [NBANKS-1:0]     banks_used = '0;

  initial rdata = '0;

  function automatic addr_t mk(input logic [BANKW-1:0] b, input logic [PAGEW-1:0] p,
                               input logic [COLW-1:0] c);
    return {b, p, c};
  endfunction

  function automatic word_t peek(input addr_t a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void poke(input addr_t a, input word_t d);
    mem[a] = d;
  endfunction

  always @(posedge clk) begin
    if (rd_at.exists(cyc)) begin
      rdata <= peek(rd_at[cyc]);
      rd_at.delete(cyc);
    end
    if (wr_at.exists(cyc)) begin
      mem[wr_at[cyc]] = wdata;
      wr_at.delete(cyc);
    end
    case (cmd.op)
      MD_ACT: begin
        n_act++;
        if (open_q[cmd.bank]) errors++;
        open_q[cmd.bank]    <= 1'b1;
        open_page[cmd.bank] <= cmd.page;
        banks_used[cmd.bank] <= 1'b1;
      end
      MD_RD, MD_WR: begin
        if (cmd.op == MD_RD) n_rd++; else n_wr++;
        if (!open_q[cmd.bank] || open_page[cmd.bank] != cmd.page) errors++;
        if (cmd.blen == 0 || int'(cmd.col) + int'(cmd.blen) > MAXBURST) errors++;
        for (int k = 0; k < int'(cmd.blen); k++) begin
          addr_t  a;
          longint t;
          a = mk(cmd.bank, cmd.page, cmd.col + COLW'(k));
          t = (cmd.op == MD_RD) ? cyc + longint'(RD_LAT) - 1 + longint'(k) : cyc + 1 + longint'(k);
          // the data bus carries one word per cycle: a read word scheduled at
          // t is on the bus in the cycle after t, a write word in cycle t
          if (cmd.op == MD_RD && (rd_at.exists(t) || wr_at.exists(t + 1))) errors++;
          if (cmd.op == MD_WR && (wr_at.exists(t) || rd_at.exists(t - 1))) errors++;
          if (cmd.op == MD_RD) rd_at[t] = a;
          else                 wr_at[t] = a;
        end
      end
      MD_PRE: begin
        n_pre++;
        if (!open_q[cmd.bank]) errors++;
        open_q[cmd.bank] <= 1'b0;
      end
      MD_REF: begin
        n_ref++;
        if (open_q != '0) errors++;
      end
      default: ;
    endcase
    cyc++;
  end
endmodule
