// tb_cmd_buffer: four clients share one port of the cube model through the
// command buffer. Each client reads random flits of a preloaded pattern and
// tags its requests with its own number in the context; every response (1 to 4 flits
// long) must reach the client that asked, with the right data and context, and no
// client may ever have more than TAGS requests outstanding, and each must
// fill its pool at some point. Out-of-order returns must be seen.
`timescale 1ns/1ps
module tb_cmd_buffer;
  import bfs_pkg::*;
  localparam int NCLI = 4, TAGS = 4, PER = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCLI-1:0] req_valid, req_ready, rsp_valid, rsp_ready;
  cli_req_t req [NCLI];
  cli_rsp_t rsp [NCLI];
  logic hv, hr, rv, idle;
  hmc_req_t hq;
  hmc_rsp_t hs;
  logic [0:0] hv_v, hr_v, rv_v;
  hmc_req_t hq_a [1];
  hmc_rsp_t hs_a [1];

  cmd_buffer #(.NCLI(NCLI), .TAGS(TAGS)) dut (
    .clk, .rst_n, .cli_req_valid(req_valid), .cli_req_ready(req_ready), .cli_req(req),
    .cli_rsp_valid(rsp_valid), .cli_rsp_ready(rsp_ready), .cli_rsp(rsp),
    .hmc_req_valid(hv), .hmc_req_ready(hr), .hmc_req(hq), .hmc_rsp_valid(rv), .hmc_rsp(hs), .idle);

  assign hv_v[0] = hv;
  assign hq_a[0] = hq;
  assign hr = hr_v[0];
  assign rv = rv_v[0];
  assign hs = hs_a[0];
  hmc_model #(.NPORT(1), .LAT_MIN(2), .LAT_VAR(20)) u_hmc (
    .clk, .req_valid(hv_v), .req_ready(hr_v), .req(hq_a), .rsp_valid(rv_v), .rsp(hs_a));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [127:0] pat(input logic [31:0] a);
    return {a ^ 32'hA5A5_0000, ~a, a * 32'd7, a + 32'd3};
  endfunction

  int sent [NCLI], got [NCLI], outst [NCLI], max_out [NCLI];
  int last_ctx_seq [NCLI];
  int n_ooo = 0;

  // request generators
  int gen [NCLI];
  always_ff @(posedge clk) begin
    for (int c = 0; c < NCLI; c++) begin
      if (!rst_n) begin
        req_valid[c] <= 1'b0;
        gen[c]       <= 0;
      end else if (!req_valid[c] || req_ready[c]) begin
        if (gen[c] < PER && $urandom_range(3) != 0) begin
          logic [31:0] a;
          a = 32'($urandom_range(255)) << 4;
          req[c].flits <= 3'(1 + $urandom_range(3 - int'(a[5:4])));
          req_valid[c] <= 1'b1;
          req[c].addr  <= (c == 3 && $urandom_range(1)) ? 32'h0010_0000 + 32'(c) * 64 : a;
          req[c].cmd   <= HMC_RD;
          req[c].data  <= '0;
          req[c].mask  <= '0;
          req[c].ctx   <= {32'(c), 32'(gen[c])};
          gen[c]       <= gen[c] + 1;
        end else begin
          req_valid[c] <= 1'b0;
        end
      end
    end
  end
  always_ff @(posedge clk) for (int c = 0; c < NCLI; c++) rsp_ready[c] <= ($urandom_range(3) != 0);

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCLI; c++) begin
      if (req_valid[c] && req_ready[c]) begin
        sent[c]++;
        outst[c]++;
      end
      if (rsp_valid[c] && rsp_ready[c]) begin
        int seq;
        got[c]++;
        outst[c]--;
        seq = int'(rsp[c].ctx[31:0]);
        check(rsp[c].ctx[63:32] == 32'(c), $sformatf("client %0d got a response of client %0d", c, rsp[c].ctx[63:32]));
        if (seq < last_ctx_seq[c]) n_ooo++;
        last_ctx_seq[c] = seq;
      end
      if (outst[c] > max_out[c]) max_out[c] = outst[c];
    end
  end

  // data check: the returned flit must be the pattern of the address read;
  // the tb remembers the address of each (client, sequence)
  logic [31:0] addr_of [NCLI][PER+1];
  int          len_of  [NCLI][PER+1];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCLI; c++) begin
      if (req_valid[c] && req_ready[c]) begin
        addr_of[c][int'(req[c].ctx[31:0])] = req[c].addr;
        len_of[c][int'(req[c].ctx[31:0])]  = int'(req[c].flits);
      end
      if (rsp_valid[c] && rsp_ready[c]) begin
        logic [31:0] a;
        logic [RD_W-1:0] e;
        a = addr_of[c][int'(rsp[c].ctx[31:0])];
        e = '0;
        if (a < 32'h0010_0000)
          for (int f = 0; f < len_of[c][int'(rsp[c].ctx[31:0])]; f++) e[f*128 +: 128] = pat(a + 32'(16 * f));
        check(rsp[c].data == e, $sformatf("client %0d data at %h", c, a));
      end
    end
  end

  initial begin
    for (int w = 0; w < 256; w++) u_hmc.mem_write(32'(w) << 4, pat(32'(w) << 4));
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait (got[0] == PER && got[1] == PER && got[2] == PER && got[3] == PER);
    repeat (3) @(negedge clk);
    for (int c = 0; c < NCLI; c++) begin
      check(max_out[c] <= TAGS, $sformatf("client %0d had %0d outstanding", c, max_out[c]));
      check(max_out[c] == TAGS, $sformatf("client %0d never filled its pool", c));
    end
    check(idle, "not idle at the end");
    check(n_ooo > 0, "no out-of-order response");
    $display("out-of-order %0d", n_ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
