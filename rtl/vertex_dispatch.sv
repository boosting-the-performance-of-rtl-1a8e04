// vertex_dispatch: spreads the frontier vertices over the parallel kernels.
//
// Vertices of one BFS level can be expanded in any order and in parallel.
// The dispatcher registers one vertex from the scanner and offers it to the
// NPE mapper kernels in round-robin order, starting after the kernel that
// took the previous one; the first kernel that is ready takes it. A new
// vertex is accepted in the cycle the held one leaves, so one vertex per
// cycle can pass. `busy` is high while a vertex is held.
// Parallel expansion of a level follows the design; round-robin order and
// the single register stage are this design's choice.
module vertex_dispatch
  import bfs_pkg::*;
#(
  parameter int unsigned NPE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [VID_W-1:0]  in_v,
  output logic [NPE-1:0]    out_valid,
  input  logic [NPE-1:0]    out_ready,
  output logic [VID_W-1:0]  out_v,
  output logic              busy
);
  localparam int unsigned PW = (NPE > 1) ? $clog2(NPE) : 1;

  logic             hold_q;
  logic [VID_W-1:0] v_q;
  logic [PW-1:0]    rr_q, pick;
  logic             pick_any;

  always_comb begin
    pick = '0;
    pick_any = 1'b0;
    for (int k = 0; k < NPE; k++) begin
      int unsigned p;
      p = (int'(rr_q) + k) % NPE;
      if (!pick_any && out_ready[p]) begin
        pick = PW'(p);
        pick_any = 1'b1;
      end
    end
    out_valid = '0;
    out_valid[pick] = hold_q && pick_any;
  end

  wire leave = hold_q && pick_any;
  assign out_v    = v_q;
  assign in_ready = !hold_q || leave;
  assign busy     = hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q <= 1'b0;
      v_q    <= '0;
      rr_q   <= '0;
    end else begin
      if (leave) rr_q <= PW'((int'(pick) + 1) % NPE);
      if (in_valid && in_ready) begin
        hold_q <= 1'b1;
        v_q    <= in_v;
      end else if (leave) begin
        hold_q <= 1'b0;
      end
    end
  end
endmodule
