// l1_bitmap: the on-chip first level of the two-level frontier bitmap.
//
// The full frontier bitmap (one bit per vertex, the second level, "L2") lives
// in the cube. This memory keeps one bit per G vertices (one L1 bit per
// G-bit chunk of L2) so that the scanner only reads the L2 chunks that hold a
// frontier vertex; for a sparse graph most chunks hold none. There are two
// banks: the current frontier, read and cleared word by word by the scanner,
// and the next frontier, whose bits the reducers set. `sel` names the
// current bank; the controller flips it at the end of a level. Because the
// scanner clears what it reads, the bank it leaves behind is all zero and can
// serve as the next frontier of the following level.
//
// Interface: the scan port reads 64-bit word `rd_idx` of the current bank
// combinationally and clears it at the clock edge when `rd_en` is high. The
// NSET set ports are served one per cycle in round robin; `set_ready` is the
// grant. `next_any` tells whether any bit of the next bank has been set since
// the last `swap`. After reset both banks are cleared, one word per cycle,
// before `init_done` rises.
// The two-level scheme follows the design; the bank structure, the word width
// and the arbitration are this design's choice.
module l1_bitmap #(
  parameter int unsigned WORDS = 2048,  // 64-bit words per bank
  parameter int unsigned NSET  = 4,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned BW   = AW + 6
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_done,
  input  logic             sel,        // current bank
  input  logic             swap,       // clears next_any
  // scan port (current bank)
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_idx,
  output logic [63:0]      rd_word,
  // set ports (next bank)
  input  logic [NSET-1:0]  set_valid,
  output logic [NSET-1:0]  set_ready,
  input  logic [BW-1:0]    set_bit [NSET],
  output logic             next_any
);
  localparam int unsigned SW = (NSET > 1) ? $clog2(NSET) : 1;

  logic [63:0] bank0 [WORDS];
  logic [63:0] bank1 [WORDS];
  logic [AW:0] init_cnt;
  logic [SW-1:0] rr_q, gnt;
  logic gnt_any;

  assign init_done = init_cnt[AW];
  assign rd_word   = sel ? bank1[rd_idx] : bank0[rd_idx];

  always_comb begin
    gnt = '0;
    gnt_any = 1'b0;
    for (int k = 0; k < NSET; k++) begin
      int unsigned p;
      p = (int'(rr_q) + k) % NSET;
      if (!gnt_any && set_valid[p]) begin
        gnt = SW'(p);
        gnt_any = 1'b1;
      end
    end
    set_ready = '0;
    set_ready[gnt] = gnt_any && init_done;
  end

  wire          do_set = gnt_any && init_done;
  wire [AW-1:0] set_w  = set_bit[gnt][BW-1:6];
  wire [63:0]   set_m  = 64'd1 << set_bit[gnt][5:0];
  wire [AW-1:0] init_w = init_cnt[AW-1:0];

  // bank 0: cleared during init, else written by whichever port owns it
  always_ff @(posedge clk) begin
    if (!init_done)                 bank0[init_w] <= '0;
    else if (!sel && rd_en)         bank0[rd_idx] <= '0;
    else if (sel && do_set)         bank0[set_w]  <= bank0[set_w] | set_m;
  end

  always_ff @(posedge clk) begin
    if (!init_done)                 bank1[init_w] <= '0;
    else if (sel && rd_en)          bank1[rd_idx] <= '0;
    else if (!sel && do_set)        bank1[set_w]  <= bank1[set_w] | set_m;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt <= '0;
      rr_q     <= '0;
      next_any <= 1'b0;
    end else begin
      if (!init_done) init_cnt <= init_cnt + 1'b1;
      if (do_set) rr_q <= SW'((int'(gnt) + 1) % NSET);
      // swap only happens while no reducer is active
      next_any <= swap ? 1'b0 : (next_any | do_set);
    end
  end
endmodule
