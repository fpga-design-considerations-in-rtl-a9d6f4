// tb_fsd_imem: checks the internal memory. All 26 channel words are written with random
// values and every parallel output (H_pinv, u_ij/u_ii, u_ii^2) is compared with what was
// written to its address; a write to an address beyond the map must change nothing.
// The vector buffer is then driven by a random producer and a random consumer: data
// must come out in order and unchanged, r_ready must drop exactly when 16 vectors are
// held (and the buffer must actually fill), rd_valid and empty must follow the count.
module tb_fsd_imem;
  import fsd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 ch_we = 1'b0;
  logic [CH_AW-1:0]     ch_addr = '0;
  cplx_t                ch_wdata = '0;
  logic                 r_valid = 1'b0, r_ready;
  cplx_t [M-1:0]        r_data = '0;
  logic                 rd_valid, rd_ready = 1'b0;
  cplx_t [M-1:0]        rd_r;
  cplx_t [M-1:0][M-1:0] hp;
  cplx_t [NU-1:0]       u_rat;
  logic [M-1:0][DW-1:0] u_sq;
  logic                 empty;

  fsd_imem dut (.clk, .rst_n, .ch_we, .ch_addr, .ch_wdata, .r_valid, .r_ready, .r_data,
                .rd_valid, .rd_ready, .rd_r, .hp, .u_rat, .u_sq, .empty);

  int checks = 0, failures = 0, n_full = 0;
  cplx_t words [NCH];
  cplx_t [M-1:0] model[$];

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL: %s", m);
  endtask

  task automatic check_channel();
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) begin
        checks++;
        if (hp[i][j] != words[i * M + j]) fail($sformatf("H_pinv[%0d][%0d]", i, j));
      end
      checks++;
      if (u_sq[i] != words[M * M + NU + i].re) fail($sformatf("u_sq[%0d]", i));
    end
    for (int u = 0; u < NU; u++) begin
      checks++;
      if (u_rat[u] != words[M * M + u]) fail($sformatf("u_rat[%0d]", u));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int a = NCH - 1; a >= 0; a--) begin
        words[a] = cplx_t'($urandom);
        ch_we = 1'b1; ch_addr = CH_AW'(a); ch_wdata = words[a];
        @(negedge clk);
      end
      ch_we = 1'b1; ch_addr = CH_AW'(NCH); ch_wdata = cplx_t'($urandom);
      @(negedge clk);
      ch_we = 1'b0;
      check_channel();
    end
    // vector buffer
    for (int n = 0; n < 2000; n++) begin
      bit push, pop;
      checks++;
      if (rd_valid != (model.size() != 0) || empty != (model.size() == 0) ||
          r_ready != (model.size() < 16)) fail($sformatf("flags with %0d held", model.size()));
      if (model.size() == 16) n_full++;
      if (rd_valid) begin
        checks++;
        if (rd_r != model[0]) fail("head of buffer");
      end
      r_valid  = (n < 1000) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd_ready = (n < 1000) ? ($urandom % 3 == 0) : ($urandom % 2 == 0);
      for (int i = 0; i < M; i++) r_data[i] = cplx_t'($urandom);
      push = r_valid && r_ready;
      pop  = rd_valid && rd_ready;
      @(negedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(r_data);
    end
    checks++;
    if (n_full == 0) fail("buffer never filled");
    $display("full_cycles=%0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
