// tb_zoo_iris: zeroth-order (gradient-free) training of the Iris-sized MLP on
// FIONA-V.
//
// Network: Linear(4 -> 10), ReLU, Linear(10 -> 3), no biases, so the trainable
// parameters are the 4*10 + 10*3 = 70 weights, held in memory as one flat
// vector (W1 row-major, then W2 row-major) padded to three 32-element tiles.
// Each training step is a two-sided random search:
//   1. the host draws a random perturbation u (each weight +-MU);
//   2. FIONA-V forms w + u and w - u tile by tile (LOAD.V, ADD.V / SUB.V,
//      STORE.V, VLEN 32);
//   3. a forward pass on FIONA-V is run for each candidate: DotProd per
//      (sample, neuron) for layer 1, PRELU.V with slope 0 as ReLU over the
//      batch, a strided LOAD.V gather and DotProd per (sample, output) for
//      layer 2;
//   4. the host computes a squared-error loss from the returned logits and
//      keeps the best of w, w + u and w - u, copying it with LOAD.V/STORE.V.
// No gradient is ever computed. Every candidate vector in memory, every logit
// returned by a DotProd and every hidden activation is compared with a
// fixed-point model in this testbench, and the final loss must not exceed the
// initial one. The number of accepted steps and the loss trajectory are
// printed.
module tb_zoo_iris;
  import fiona_pkg::*;
  localparam int NB = 32, NIN = 4, NH = 10, NO = 3, NP = NIN * NH + NH * NO, DEPTH = 4096;
  localparam int NSTEP = 20, MU = 16;                // perturbation 1/16 in Q8.8
  localparam int AX = 0, AP = 256, APLUS = 384, AMIN = 512, AU = 640, AH = 768;

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
  mem_model #(.DEPTH(DEPTH), .STALLS(1'b0)) u_mem (.*);
  photonic_model #(.LATENCY(4), .STALLS(1'b0)) u_ph (.*);

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

  logic [15:0] x [NB][NIN];
  int          label [NB];
  logic [15:0] w [NP], u [NP];

  // host-side parameter vector in memory at 'base', checked against 'p'
  task automatic check_params(int base, logic [15:0] p [NP], string what);
    for (int i = 0; i < NP; i++) begin
      checks++;
      if (u_mem.mem[base + i] !== p[i]) begin
        failures++;
        if (failures < 10) $display("%s[%0d] = %h expected %h", what, i, u_mem.mem[base + i], p[i]);
      end
    end
  endtask

  // w_out = w_a (+ or -) w_b over the three tiles, on FIONA-V
  task automatic vec_op(int a, int b, int dst, bit sub);
    logic [31:0] d;
    set_stride(1);
    set_vlen(32);
    for (int t = 0; t < 3; t++) begin
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd1), 32'(a + 32 * t), 0, d);
      if (b >= 0) begin
        issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd2), 32'(b + 32 * t), 0, d);
        issue(mk(sub ? F_SUBV : F_ADDV, 5'd2, 5'd1, 0, 0, 0, 5'd1), 0, 0, d);
      end
      issue(mk(F_STOREV, 5'd1, 5'd1, 0, 1, 0, 5'd0), 32'(dst + 32 * t), 0, d);
    end
    wait_idle();
  endtask

  // forward pass with the parameters at 'base' on FIONA-V; returns the loss
  // (squared error against one-hot targets, Q16.16) computed from the
  // returned logits, and checks every hidden value and logit against p
  task automatic forward(int base, logic [15:0] p [NP], output longint loss);
    logic [31:0] d;
    logic [15:0] h [NH][NB];
    // reference hidden layer
    for (int j = 0; j < NH; j++)
      for (int n = 0; n < NB; n++) begin
        longint acc = 0;
        logic [15:0] z;
        for (int f = 0; f < NIN; f++) acc += sx(x[n][f]) * sx(p[j * NIN + f]);
        z = sat(acc);
        h[j][n] = z[15] ? 16'd0 : z;
      end
    set_stride(1);
    set_vlen(NIN);
    for (int j = 0; j < NH; j++) issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'(10 + j)), 32'(base + j * NIN), 0, d);
    for (int n = 0; n < NB; n++) begin
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd1), 32'(AX + n * NIN), 0, d);
      for (int j = 0; j < NH; j++) begin
        issue(mk(F_DOTPROD, 5'(10 + j), 5'd1, 1, 0, 0, 5'd5), 0, 0, d);
        u_mem.mem[AH + j * NB + n] = d[15:0];
      end
    end
    set_vlen(NB);
    for (int j = 0; j < NH; j++) begin
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd2), 32'(AH + j * NB), 0, d);
      issue(mk(F_NLU, 5'd4, 5'd2, 0, 0, 1, 5'd2), 0, 32'd0, d);
      issue(mk(F_STOREV, 5'd2, 5'd1, 0, 1, 0, 5'd0), 32'(AH + j * NB), 0, d);
    end
    wait_idle();
    for (int j = 0; j < NH; j++)
      for (int n = 0; n < NB; n++) begin
        checks++;
        if (u_mem.mem[AH + j * NB + n] !== h[j][n]) begin
          failures++;
          if (failures < 10) $display("hidden[%0d][%0d] = %h expected %h", j, n, u_mem.mem[AH + j * NB + n], h[j][n]);
        end
      end
    set_vlen(NH);
    for (int k = 0; k < NO; k++) issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'(20 + k)), 32'(base + NIN * NH + k * NH), 0, d);
    set_stride(NB);
    loss = 0;
    for (int n = 0; n < NB; n++) begin
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd1), 32'(AH + n), 0, d);
      for (int k = 0; k < NO; k++) begin
        longint acc = 0;
        longint e;
        for (int j = 0; j < NH; j++) acc += sx(h[j][n]) * sx(p[NIN * NH + k * NH + j]);
        issue(mk(F_DOTPROD, 5'(20 + k), 5'd1, 1, 0, 0, 5'd5), 0, 0, d);
        checks++;
        if (d !== 32'(sx(sat(acc)))) begin
          failures++;
          if (failures < 10) $display("logit[%0d][%0d] = %h expected %h", n, k, d, sat(acc));
        end
        e = sx(d[15:0]) - ((k == label[n]) ? 256 : 0);
        loss += e * e;
      end
    end
  endtask

  initial begin
    logic [15:0] wp [NP], wm [NP];
    longint l0, lcur, lp, lm;
    int accepted;
    int t0;
    cmd_valid = 0; cmd = '0;
    accepted = 0;
    // three feature patterns with noise; the label is the pattern
    for (int n = 0; n < NB; n++) begin
      label[n] = n % NO;
      for (int f = 0; f < NIN; f++)
        x[n][f] = 16'(((f % NO) == label[n] ? 384 : 64) + $urandom_range(0, 63));
    end
    for (int i = 0; i < NP; i++) w[i] = 16'($urandom_range(0, 127) - 64);
    for (int i = 0; i < DEPTH; i++) u_mem.mem[i] = '0;
    for (int n = 0; n < NB; n++) for (int f = 0; f < NIN; f++) u_mem.mem[AX + n * NIN + f] = x[n][f];
    for (int i = 0; i < NP; i++) u_mem.mem[AP + i] = w[i];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = $time;

    forward(AP, w, l0);
    lcur = l0;
    $display("ZOO step 0: loss %0d", lcur);
    for (int s = 1; s <= NSTEP; s++) begin
      for (int i = 0; i < NP; i++) begin
        u[i] = $urandom_range(0, 1) ? 16'(MU) : 16'(-MU);
        u_mem.mem[AU + i] = u[i];
        wp[i] = w[i] + u[i];
        wm[i] = w[i] - u[i];
      end
      vec_op(AP, AU, APLUS, 1'b0);
      vec_op(AP, AU, AMIN, 1'b1);
      check_params(APLUS, wp, "w+u");
      check_params(AMIN, wm, "w-u");
      forward(APLUS, wp, lp);
      forward(AMIN, wm, lm);
      if (lp < lcur && lp <= lm) begin
        vec_op(APLUS, -1, AP, 1'b0);
        w = wp; lcur = lp; accepted++;
      end else if (lm < lcur) begin
        vec_op(AMIN, -1, AP, 1'b0);
        w = wm; lcur = lm; accepted++;
      end
      check_params(AP, w, "w");
      $display("ZOO step %0d: loss +u %0d, -u %0d, kept %0d", s, lp, lm, lcur);
    end
    checks++;
    if (lcur > l0) begin failures++; $display("loss rose from %0d to %0d", l0, lcur); end
    $display("ZOO: %0d of %0d steps accepted, loss %0d -> %0d; %0d instructions, %0d cycles; pOps %0d, eOps %0d, Mem %0d",
             accepted, NSTEP, l0, lcur, perf_insts, ($time - t0) / 10, perf_pops, perf_eops, perf_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
