// tb_mnist_tiled: one MNIST-sized fully connected layer, 784 inputs by 16
// outputs, on FIONA-V, with the input dimension tiled into the 32-element
// vector length as the host library does it.
//
// Each output is the sum of 25 DotProd partial results: 24 full tiles with
// VLEN 32 and a last tile of 16 elements with VLEN 16. For every tile the
// host issues LOAD.V of the input tile and of the weight tile, then DotProd,
// and adds the returned partial sums in a 32-bit accumulator. Every partial
// sum and every output is checked. The memory
// and the photonic model stall at random. The expected outputs are computed
// here with the same fixed-point rules (each partial sum shifted by 8 and
// saturated to 16 bits, then summed in 32 bits). The number of photonic
// operations and the cycle split are checked and printed.
module tb_mnist_tiled;
  import fiona_pkg::*;
  localparam int NB = 2, NIN = 784, NOUT = 16, DEPTH = 16384;
  localparam int NT = (NIN + 31) / 32;
  localparam int AX = 0, AW = 2048;

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

  logic [15:0] x [NB][NIN], w [NOUT][NIN];

  initial begin
    logic [31:0] d;
    int t0;
    cmd_valid = 0; cmd = '0;
    for (int n = 0; n < NB; n++) for (int i = 0; i < NIN; i++) x[n][i] = 16'($urandom_range(0, 255));
    for (int o = 0; o < NOUT; o++) for (int i = 0; i < NIN; i++) w[o][i] = 16'($urandom_range(0, 32) - 16);
    for (int i = 0; i < DEPTH; i++) u_mem.mem[i] = '0;
    for (int n = 0; n < NB; n++) for (int i = 0; i < NIN; i++) u_mem.mem[AX + n * NIN + i] = x[n][i];
    for (int o = 0; o < NOUT; o++) for (int i = 0; i < NIN; i++) u_mem.mem[AW + o * NIN + i] = w[o][i];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = $time;
    set_stride(1);
    for (int n = 0; n < NB; n++)
      for (int o = 0; o < NOUT; o++) begin
        int acc, ref_acc;
        acc = 0;
        ref_acc = 0;
        for (int t = 0; t < NT; t++) begin
          int len;
          longint p;
          len = (NIN - 32 * t < 32) ? NIN - 32 * t : 32;
          set_vlen(len);
          issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd1), 32'(AX + n * NIN + 32 * t), 0, d);
          issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd2), 32'(AW + o * NIN + 32 * t), 0, d);
          issue(mk(F_DOTPROD, 5'd2, 5'd1, 1, 0, 0, 5'd5), 0, 0, d);
          acc += int'(signed'(d));
          p = 0;
          for (int i = 32 * t; i < 32 * t + len; i++) p += sx(x[n][i]) * sx(w[o][i]);
          ref_acc += int'(sx(sat(p)));
          checks++;
          if (d !== 32'(sx(sat(p)))) begin
            failures++;
            if (failures < 10) $display("tile %0d of y[%0d][%0d] = %h expected %h", t, n, o, d, sat(p));
          end
        end
        checks++;
        if (acc != ref_acc) begin
          failures++;
          if (failures < 10) $display("y[%0d][%0d] = %0d expected %0d", n, o, acc, ref_acc);
        end
      end
    wait_idle();
    checks++;
    if (u_ph.n_ops != NB * NOUT * NT) begin failures++; $display("%0d photonic ops, expected %0d", u_ph.n_ops, NB * NOUT * NT); end
    checks++;
    if (perf_insts != 1 + NB * NOUT * NT * 4) begin failures++; $display("%0d instructions counted", perf_insts); end
    $display("784x16 layer, batch %0d: %0d DotProd tiles, %0d cycles; pOps %0d, eOps %0d, Mem %0d",
             NB, u_ph.n_ops, ($time - t0) / 10, perf_pops, perf_eops, perf_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
