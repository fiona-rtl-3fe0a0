// tb_conv2d_tiled: a small 2-D convolution layer on FIONA-V, built from
// DotProd the way the host library maps convolutions onto the dot-product
// core, with the im2col step done inside the vector unit.
//
// Layer: one 8 x 8 input channel, four 3 x 3 kernels, stride 1, no padding,
// so 6 x 6 x 4 outputs, then ReLU. For each output row r the host loads the
// 32 elements starting at image row r (rows r..r+3) with LOAD.V. For each
// output column c it forms the index vector {0,1,2,8,9,10,16,17,18} + c with
// ADD.VS from a stored base vector, gathers the 3 x 3 patch with SHUFFLE.V
// (VLEN 9), and runs one DotProd per kernel. The output feature map is then
// loaded back channel by channel in a tile of 32 and a tile of 4, passed through PRELU.V with
// slope 0 (ReLU) and stored. Memory and DAC stall at random. Every
// convolution output and every activated value is compared with a
// fixed-point model here.
module tb_conv2d_tiled;
  import fiona_pkg::*;
  localparam int H = 8, K = 3, NK = 4, HO = H - K + 1, DEPTH = 4096;
  localparam int AX = 0, AIDX = 128, AKER = 160, AY = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  logic [15:0] mem_resp_rdata;
  logic dac_valid, dac_ready, adc_valid;
  pop_e dac_op;
  logic [31:0][15:0] dac_a, dac_b, adc_data;
  logic [31:0][31:0][15:0] dac_mat;
  logic [31:0][31:0] vmask;
  logic [31:0] perf_pops, perf_eops, perf_mem, perf_insts;

  fiona_v dut (.*);
  mem_model #(.DEPTH(DEPTH)) u_mem (.*);
  photonic_model #(.LATENCY(6)) u_ph (.*);

  always #5 clk = ~clk;
  assign resp_ready = 1'b1;

  int checks = 0, failures = 0;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rocc_inst_t mk(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                     logic xd, logic xs1, logic xs2, logic [4:0] rd);
    rocc_inst_t in;
    in.funct7 = f7; in.rs2 = rs2; in.rs1 = rs1; in.xd = xd; in.xs1 = xs1; in.xs2 = xs2;
    in.rd = rd; in.opcode = OPC_CUSTOM0;
    return in;
  endfunction

  task automatic issue(rocc_inst_t in, logic [31:0] r1, logic [31:0] r2, output logic [31:0] data);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd.inst = in; cmd.rs1 = r1; cmd.rs2 = r2;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    data = '0;
    if (in.xd) begin
      @(posedge clk);
      while (!resp_valid) @(posedge clk);
      data = resp.data;
    end
  endtask

  task automatic set_vlen(int n);
    logic [31:0] d;
    issue(mk(F_SETR, 0, 5'd1, 0, 1, 0, SETR_VLEN), 32'(n), 0, d);
  endtask
  task automatic set_stride(int n);
    logic [31:0] d;
    issue(mk(F_SETR, 0, 5'd1, 0, 1, 0, SETR_STRIDE), 32'(n), 0, d);
  endtask
  task automatic wait_idle();
    wait (!busy);
    @(negedge clk);
  endtask

  function automatic logic [15:0] sat(longint v);
    v = v >>> 8;
    if (v > 32767) return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction
  function automatic longint sx(logic [15:0] v);
    return longint'(signed'(v));
  endfunction

  logic [15:0] img [H][H], ker [NK][K][K], y [NK][HO][HO];

  initial begin
    logic [31:0] d;
    int t0, nconv;
    cmd_valid = 0; cmd = '0;
    nconv = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < H; c++) img[r][c] = 16'($urandom_range(0, 511));
    for (int k = 0; k < NK; k++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
      ker[k][i][j] = 16'($urandom_range(0, 255) - 128);
    for (int i = 0; i < DEPTH; i++) u_mem.mem[i] = '0;
    for (int r = 0; r < H; r++) for (int c = 0; c < H; c++) u_mem.mem[AX + r * H + c] = img[r][c];
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) u_mem.mem[AIDX + i * K + j] = 16'(i * H + j);
    for (int k = 0; k < NK; k++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
      u_mem.mem[AKER + k * 16 + i * K + j] = ker[k][i][j];
    // reference
    for (int k = 0; k < NK; k++)
      for (int r = 0; r < HO; r++)
        for (int c = 0; c < HO; c++) begin
          longint acc;
          acc = 0;
          for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) acc += sx(img[r + i][c + j]) * sx(ker[k][i][j]);
          y[k][r][c] = sat(acc);
        end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = $time;
    set_stride(1);
    set_vlen(K * K);
    issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd2), 32'(AIDX), 0, d);
    for (int k = 0; k < NK; k++) issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'(10 + k)), 32'(AKER + k * 16), 0, d);
    for (int r = 0; r < HO; r++) begin
      set_vlen(32);
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd1), 32'(AX + r * H), 0, d);
      set_vlen(K * K);
      for (int c = 0; c < HO; c++) begin
        issue(mk(F_ADDVS, 5'd3, 5'd2, 0, 0, 1, 5'd3), 0, 32'(c), d);
        issue(mk(F_SHUFFLE, 5'd3, 5'd1, 0, 0, 0, 5'd4), 0, 0, d);
        for (int k = 0; k < NK; k++) begin
          issue(mk(F_DOTPROD, 5'(10 + k), 5'd4, 1, 0, 0, 5'd5), 0, 0, d);
          nconv++;
          checks++;
          if (d !== 32'(sx(y[k][r][c]))) begin
            failures++;
            if (failures < 10) $display("y[%0d][%0d][%0d] = %h expected %h", k, r, c, d, y[k][r][c]);
          end
          u_mem.mem[AY + k * 64 + r * HO + c] = d[15:0];   // host store
        end
      end
    end
    // ReLU over each output channel (36 values: one tile of 32 and one of 4)
    for (int k = 0; k < NK; k++)
      for (int t = 0; t < 2; t++) begin
        set_vlen(t == 0 ? 32 : HO * HO - 32);
        issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd6), 32'(AY + k * 64 + 32 * t), 0, d);
        issue(mk(F_NLU, 5'd4, 5'd6, 0, 0, 1, 5'd6), 0, 32'd0, d);
        issue(mk(F_STOREV, 5'd6, 5'd1, 0, 1, 0, 5'd0), 32'(AY + k * 64 + 32 * t), 0, d);
      end
    wait_idle();
    for (int k = 0; k < NK; k++)
      for (int r = 0; r < HO; r++)
        for (int c = 0; c < HO; c++) begin
          logic [15:0] e;
          e = y[k][r][c][15] ? 16'd0 : y[k][r][c];
          checks++;
          if (u_mem.mem[AY + k * 64 + r * HO + c] !== e) begin
            failures++;
            if (failures < 10) $display("relu y[%0d][%0d][%0d] = %h expected %h", k, r, c, u_mem.mem[AY + k * 64 + r * HO + c], e);
          end
        end
    checks++;
    if (u_ph.n_ops != NK * HO * HO) begin failures++; $display("%0d photonic ops, expected %0d", u_ph.n_ops, NK * HO * HO); end
    $display("conv 8x8, 4 kernels 3x3: %0d DotProd, %0d instructions, %0d cycles; pOps %0d, eOps %0d, Mem %0d",
             nconv, perf_insts, ($time - t0) / 10, perf_pops, perf_eops, perf_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
