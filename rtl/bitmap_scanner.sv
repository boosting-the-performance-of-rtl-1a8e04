// bitmap_scanner: turns the current frontier bitmap into a stream of vertices.
//
// It walks the current bank of the on-chip L1 bitmap one 64-bit word per
// step, up to the last word that covers `num_vertices`, clearing each word as
// it reads it. For every set L1 bit j it reads the G-bit chunk j of the L2
// frontier bitmap in the cube: K = G/512 reads of one 64-byte block each
// (client 0 of its command buffer, context = address of the block). Each
// block that comes back is cleared in the cube (client 1) by one write that
// covers only its non-zero flits, so the L2 bank is clean when the level
// ends, and its set bits are sent out, one vertex per cycle, on the
// valid/ready stream `v_*`. The zero write is issued only after the read
// data has arrived, so the cube never sees the write before the read.
// Blocks that come back all zero are not written.
//
// `start` begins a scan; `busy` stays high until every L1 word has been read,
// every chunk read issued and every returned block emitted (the command
// buffer reports the reads still in flight separately).
// The two-level scan follows the design; G, the word width and the
// write-back of zeros are this design's choice.
module bitmap_scanner
  import bfs_pkg::*;
#(
  parameter int unsigned G       = 512,   // L2 bits per L1 bit
  parameter int unsigned L1_WORDS = 2048,
  localparam int unsigned AW     = (L1_WORDS > 1) ? $clog2(L1_WORDS) : 1,
  localparam int unsigned K      = G / RD_W     // HMC reads per L1 bit (G a multiple of 512)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              sel,            // current frontier bank
  input  mem_map_t          map,
  input  logic [VID_W-1:0]  num_vertices,
  output logic              busy,
  // L1 bitmap scan port
  output logic              l1_rd_en,
  output logic [AW-1:0]     l1_rd_idx,
  input  logic [63:0]       l1_rd_word,
  // command buffer clients: 0 = chunk reads, 1 = zero writes
  output logic [1:0]        cli_req_valid,
  input  logic [1:0]        cli_req_ready,
  output cli_req_t          cli_req [2],
  input  logic [1:0]        cli_rsp_valid,
  output logic [1:0]        cli_rsp_ready,
  input  cli_rsp_t          cli_rsp [2],
  // frontier vertices
  output logic              v_valid,
  input  logic              v_ready,
  output logic [VID_W-1:0]  v,
  // statistics: L2 reads issued
  output logic              scan_read
);
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned VPW = G * 64;   // vertices covered by one L1 word

  typedef enum logic [1:0] {S_IDLE, S_L1, S_BITS, S_CHUNK} state_e;
  state_e state_q;

  logic [AW:0]       idx_q;     // next L1 word
  logic [AW:0]       nwords_q;
  logic [63:0]       word_q;
  logic [AW-1:0]     widx_q;    // index of word_q
  logic [5:0]        bit_q;
  logic [KW:0]       r_q;

  // lowest set bit of the L1 word
  logic [5:0] lsb;
  always_comb begin
    lsb = '0;
    for (int i = 63; i >= 0; i--) if (word_q[i]) lsb = 6'(i);
  end

  wire [ADDR_W-1:0] l2_base  = sel ? map.frontier1 : map.frontier0;
  wire [ADDR_W-1:0] chunk_no = ADDR_W'({widx_q, bit_q});
  wire [ADDR_W-1:0] rd_addr  = l2_base + chunk_no * ADDR_W'(G / 8) + ADDR_W'(r_q) * ADDR_W'(RD_B);

  assign l1_rd_en  = (state_q == S_L1) && (idx_q < nwords_q);
  assign l1_rd_idx = idx_q[AW-1:0];

  always_comb begin
    cli_req_valid[0] = (state_q == S_CHUNK);
    cli_req[0].cmd   = HMC_RD;
    cli_req[0].addr  = rd_addr;
    cli_req[0].flits = LEN_W'(RD_FLITS);
    cli_req[0].data  = '0;
    cli_req[0].mask  = '0;
    cli_req[0].ctx   = CTX_W'(rd_addr);
  end
  assign scan_read = cli_req_valid[0] && cli_req_ready[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      idx_q    <= '0;
      nwords_q <= '0;
      word_q   <= '0;
      widx_q   <= '0;
      bit_q    <= '0;
      r_q      <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          idx_q    <= '0;
          nwords_q <= (AW+1)'((num_vertices + VID_W'(VPW - 1)) / VID_W'(VPW));
          state_q  <= S_L1;
        end
        S_L1: begin
          if (idx_q >= nwords_q) state_q <= S_IDLE;
          else begin
            word_q  <= l1_rd_word;
            widx_q  <= idx_q[AW-1:0];
            idx_q   <= idx_q + 1'b1;
            state_q <= S_BITS;
          end
        end
        S_BITS: begin
          if (word_q == '0) state_q <= S_L1;
          else begin
            bit_q   <= lsb;
            r_q     <= '0;
            state_q <= S_CHUNK;
          end
        end
        S_CHUNK: if (cli_req_ready[0]) begin
          if (r_q == (KW+1)'(K - 1)) begin
            word_q[bit_q] <= 1'b0;
            state_q <= S_BITS;
          end else begin
            r_q <= r_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------- returned flits -> vertices ----------------
  logic               hold_q;
  logic [RD_W-1:0]    bits_q;
  logic [VID_W-1:0]   base_q;

  wire [ADDR_W-1:0] rsp_addr = ADDR_W'(cli_rsp[0].ctx);
  wire              rsp_zero = (cli_rsp[0].data == '0);

  // first and last non-zero flit of the returned block
  logic [LEN_W-1:0] nz_first, nz_last;
  always_comb begin
    nz_first = '0;
    nz_last  = '0;
    for (int f = RD_FLITS - 1; f >= 0; f--)
      if (cli_rsp[0].data[f*FLIT_W +: FLIT_W] != '0) nz_first = LEN_W'(f);
    for (int f = 0; f < RD_FLITS; f++)
      if (cli_rsp[0].data[f*FLIT_W +: FLIT_W] != '0) nz_last = LEN_W'(f);
  end
  // accept the next block once the held one is fully emitted and the zero
  // write (if needed) can go out in the same cycle
  wire take = !hold_q && cli_rsp_valid[0] && (rsp_zero || cli_req_ready[1]);

  always_comb begin
    cli_req_valid[1] = !hold_q && cli_rsp_valid[0] && !rsp_zero;
    cli_req[1].cmd   = HMC_WR;
    cli_req[1].addr  = rsp_addr + ADDR_W'(nz_first) * ADDR_W'(FLIT_B);
    cli_req[1].flits = nz_last - nz_first + 1'b1;
    cli_req[1].data  = '0;
    cli_req[1].mask  = '1;
    cli_req[1].ctx   = '0;
    cli_rsp_ready[0] = take;
    cli_rsp_ready[1] = 1'b1;   // write acks carry nothing
  end

  logic [$clog2(RD_W)-1:0] blsb;
  always_comb begin
    blsb = '0;
    for (int i = RD_W - 1; i >= 0; i--) if (bits_q[i]) blsb = ($clog2(RD_W))'(i);
  end

  assign v_valid = hold_q && (bits_q != '0);
  assign v       = base_q + VID_W'(blsb);

  // vertex number of bit 0 of the returned block
  wire [ADDR_W-1:0] rsp_off = rsp_addr - l2_base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q <= 1'b0;
      bits_q <= '0;
      base_q <= '0;
    end else begin
      if (take && !rsp_zero) begin
        hold_q <= 1'b1;
        bits_q <= cli_rsp[0].data;
        base_q <= VID_W'(rsp_off) << 3;
      end else if (hold_q) begin
        if (bits_q == '0) hold_q <= 1'b0;
        else if (v_ready) bits_q[blsb] <= 1'b0;
      end
    end
  end

  assign busy = (state_q != S_IDLE) || hold_q;
endmodule
