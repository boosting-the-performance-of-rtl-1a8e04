// hmc_model: behavioural model of a Hybrid Memory Cube behind an FPGA HMC
// controller, for simulation only (not synthesizable).
//
// NPORT user ports, each a valid/ready request channel and a response
// channel that is never back-pressured. The memory is sparse (an associative
// array of 16-byte flits, zero where never written). Every request gets a
// random latency between LAT_MIN and LAT_MIN+LAT_VAR cycles and the port
// returns, each cycle, a random one of its due requests, so responses come
// back out of order. A command takes effect when its response is returned:
// RD returns `flits` consecutive flits (flit 0 in the low bits), WR writes
// `flits` flits, BWR changes only the bits of one flit that are set in the
// mask (the cube's atomic bit write). `ready` drops at random (READY_PCT
// percent of cycles ready) and when QMAX requests are pending.
// mem_read / mem_write give the testbench direct access, as a host would
// have before and after a run.
module hmc_model
  import bfs_pkg::*;
#(
  parameter int NPORT     = 1,
  parameter int LAT_MIN   = 4,
  parameter int LAT_VAR   = 12,
  parameter int READY_PCT = 80,
  parameter int QMAX      = 64
) (
  input  logic              clk,
  input  logic [NPORT-1:0]  req_valid,
  output logic [NPORT-1:0]  req_ready,
  input  hmc_req_t          req [NPORT],
  output logic [NPORT-1:0]  rsp_valid,
  output hmc_rsp_t          rsp [NPORT]
);
  typedef struct {
    hmc_req_t    r;
    longint      due;
  } pend_t;

  logic [FLIT_W-1:0] mem [longint];
  pend_t             q [NPORT][$];
  longint            now = 0;
  longint            n_req = 0;
  longint            n_bwr = 0;
  longint            n_long = 0;   // reads of more than one flit
  int                max_pend = 0;

  function automatic logic [FLIT_W-1:0] mem_read(input logic [ADDR_W-1:0] a);
    longint k = longint'(a[ADDR_W-1:4]);
    return mem.exists(k) ? mem[k] : '0;
  endfunction

  function automatic void mem_write(input logic [ADDR_W-1:0] a, input logic [FLIT_W-1:0] d);
    mem[longint'(a[ADDR_W-1:4])] = d;
  endfunction

  function automatic void mem_write32(input logic [ADDR_W-1:0] a, input logic [31:0] d);
    logic [FLIT_W-1:0] f;
    f = mem_read(a);
    f[32*a[3:2] +: 32] = d;
    mem_write(a, f);
  endfunction

  initial begin
    req_ready = '0;
    rsp_valid = '0;
    for (int p = 0; p < NPORT; p++) rsp[p] = '0;
  end

  always @(posedge clk) begin
    now++;
    for (int p = 0; p < NPORT; p++) begin
      // accept
      if (req_valid[p] && req_ready[p]) begin
        pend_t e;
        e.r   = req[p];
        if (req[p].cmd == HMC_RD && req[p].flits > 1) n_long++;
        if (req[p].flits == 0 || int'(req[p].flits) > int'(RD_FLITS) ||
            (req[p].cmd == HMC_BWR && req[p].flits != 1) ||
            (int'(req[p].addr[5:4]) + int'(req[p].flits) > int'(RD_FLITS)))
          $error("port %0d: bad length %0d at %h", p, req[p].flits, req[p].addr);
        e.due = now + longint'(LAT_MIN) + longint'($urandom_range(LAT_VAR));
        q[p].push_back(e);
        n_req++;
        if (q[p].size() > max_pend) max_pend = q[p].size();
      end
      // respond with a random due entry
      rsp_valid[p] <= 1'b0;
      begin
        int due_idx [$];
        due_idx.delete();
        for (int i = 0; i < q[p].size(); i++) if (q[p][i].due <= now) due_idx.push_back(i);
        if (due_idx.size() > 0) begin
          int      i;
          hmc_req_t r;
          hmc_rsp_t o;
          i = due_idx[$urandom_range(due_idx.size() - 1)];
          r = q[p][i].r;
          q[p].delete(i);
          o.tag  = r.tag;
          o.data = '0;
          case (r.cmd)
            HMC_RD:  for (int f = 0; f < int'(r.flits); f++)
                       o.data[f*FLIT_W +: FLIT_W] = mem_read(r.addr + 32'(16 * f));
            HMC_WR:  for (int f = 0; f < int'(r.flits); f++)
                       mem_write(r.addr + 32'(16 * f), r.data[f*FLIT_W +: FLIT_W]);
            HMC_BWR: begin
              mem_write(r.addr, (mem_read(r.addr) & ~r.mask) | (r.data[FLIT_W-1:0] & r.mask));
              n_bwr++;
            end
            default: ;
          endcase
          rsp_valid[p] <= 1'b1;
          rsp[p]       <= o;
        end
      end
      req_ready[p] <= (q[p].size() < QMAX) && ($urandom_range(99) < READY_PCT);
    end
  end
endmodule
