// cmd_buffer: shares one HMC user port among several kernel clients.
//
// The cube returns responses out of order, so every request needs a tag that
// says whom the answer belongs to. The buffer splits the tag space into one
// pool of TAGS tags per client (tag = {client, slot}); a client can only
// issue while its own pool has a free slot, so one client's traffic can never
// starve or block another's. With each request the client stores CTX_W bits
// of context; the response data is parked in the slot and the slot number is
// queued on the client's completion FIFO, which hands {data, ctx} back in the
// order the responses arrived. A slot is freed when its client pops it.
// Because every response already owns a slot, the port's response channel is
// never back-pressured.
//
// Timing: a request is granted (round robin among clients with a free slot)
// and forwarded to the port in the same cycle; responses are written in one
// cycle and readable by the client from the next.
// The split of traffic by kernel follows the design's map/reduce structure;
// the per-client pools and their sizes are this design's own choice.
module cmd_buffer
  import bfs_pkg::*;
#(
  parameter int unsigned NCLI = 4,
  parameter int unsigned TAGS = 8   // slots per client, power of two
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // clients
  input  logic [NCLI-1:0]      cli_req_valid,
  output logic [NCLI-1:0]      cli_req_ready,
  input  cli_req_t             cli_req [NCLI],
  output logic [NCLI-1:0]      cli_rsp_valid,
  input  logic [NCLI-1:0]      cli_rsp_ready,
  output cli_rsp_t             cli_rsp [NCLI],
  // HMC user port
  output logic                 hmc_req_valid,
  input  logic                 hmc_req_ready,
  output hmc_req_t             hmc_req,
  input  logic                 hmc_rsp_valid,
  input  hmc_rsp_t             hmc_rsp,
  // no request outstanding and no response waiting
  output logic                 idle
);
  localparam int unsigned IW  = (TAGS > 1) ? $clog2(TAGS) : 1;
  localparam int unsigned CW  = (NCLI > 1) ? $clog2(NCLI) : 1;
  localparam int unsigned NT  = NCLI * TAGS;

  logic [NT-1:0]     busy_q;
  logic [CTX_W-1:0]  ctx_q  [NT];
  logic [RD_W-1:0]   data_q [NT];

  // completion FIFOs, one per client
  logic [IW-1:0]     cq     [NCLI][TAGS];
  logic [IW:0]       cq_cnt [NCLI];
  logic [IW-1:0]     cq_rd  [NCLI];
  logic [IW-1:0]     cq_wr  [NCLI];

  // ---------------- request side ----------------
  logic [NCLI-1:0] has_free;
  logic [IW-1:0]   free_slot [NCLI];
  logic [CW-1:0]   rr_q;
  logic [CW-1:0]   gnt;
  logic            gnt_any;

  always_comb begin
    for (int c = 0; c < NCLI; c++) begin
      has_free[c]  = 1'b0;
      free_slot[c] = '0;
      for (int i = TAGS - 1; i >= 0; i--) begin
        if (!busy_q[c*TAGS + i]) begin
          has_free[c]  = 1'b1;
          free_slot[c] = IW'(i);
        end
      end
    end
  end

  always_comb begin
    gnt     = '0;
    gnt_any = 1'b0;
    for (int k = 0; k < NCLI; k++) begin
      int unsigned c;
      c = (int'(rr_q) + k) % NCLI;
      if (!gnt_any && cli_req_valid[c] && has_free[c]) begin
        gnt     = CW'(c);
        gnt_any = 1'b1;
      end
    end
  end

  assign hmc_req_valid = gnt_any;
  always_comb begin
    hmc_req.cmd  = cli_req[gnt].cmd;
    hmc_req.tag  = TAG_W'({gnt, free_slot[gnt]});
    hmc_req.addr = cli_req[gnt].addr;
    hmc_req.flits = cli_req[gnt].flits;
    hmc_req.data = cli_req[gnt].data;
    hmc_req.mask = cli_req[gnt].mask;
    cli_req_ready = '0;
    cli_req_ready[gnt] = gnt_any && hmc_req_ready;
  end

  wire issue = gnt_any && hmc_req_ready;
  wire [IW+CW-1:0] issue_tag = {gnt, free_slot[gnt]};

  // ---------------- response side ----------------
  wire [CW-1:0] rsp_cli  = CW'(hmc_rsp.tag[IW +: CW]);
  wire [IW-1:0] rsp_slot = hmc_rsp.tag[IW-1:0];

  always_comb begin
    for (int c = 0; c < NCLI; c++) begin
      cli_rsp_valid[c]  = (cq_cnt[c] != 0);
      cli_rsp[c].data   = data_q[c*TAGS + int'(cq[c][cq_rd[c]])];
      cli_rsp[c].ctx    = ctx_q [c*TAGS + int'(cq[c][cq_rd[c]])];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      rr_q   <= '0;
      for (int c = 0; c < NCLI; c++) begin
        cq_cnt[c] <= '0;
        cq_rd[c]  <= '0;
        cq_wr[c]  <= '0;
      end
    end else begin
      if (issue) begin
        busy_q[issue_tag] <= 1'b1;
        ctx_q[issue_tag]  <= cli_req[gnt].ctx;
        rr_q <= CW'((int'(gnt) + 1) % NCLI);
      end
      for (int c = 0; c < NCLI; c++) begin
        logic push, pop;
        push = hmc_rsp_valid && (rsp_cli == CW'(c));
        pop  = cli_rsp_valid[c] && cli_rsp_ready[c];
        if (push) begin
          cq[c][cq_wr[c]] <= rsp_slot;
          cq_wr[c] <= cq_wr[c] + 1'b1;
        end
        if (pop) begin
          busy_q[c*TAGS + int'(cq[c][cq_rd[c]])] <= 1'b0;
          cq_rd[c] <= cq_rd[c] + 1'b1;
        end
        cq_cnt[c] <= cq_cnt[c] + (IW+1)'(push) - (IW+1)'(pop);
      end
      if (hmc_rsp_valid) data_q[{rsp_cli, rsp_slot}] <= hmc_rsp.data;
    end
  end

  assign idle = (busy_q == '0);

  // a response must carry a tag that is outstanding
  always_ff @(posedge clk) begin
    if (rst_n && hmc_rsp_valid)
      a_rsp_tag: assert (busy_q[{rsp_cli, rsp_slot}])
        else $error("response with tag %0h that is not outstanding", hmc_rsp.tag);
  end
endmodule
