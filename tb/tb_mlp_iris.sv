// tb_mlp_iris: runs an Iris-sized multilayer perceptron on FIONA-V.
//
// Network: Linear(4 -> 10), ReLU, Linear(10 -> 3), then argmax, on a batch of
// 32 samples, with every matrix product decomposed into DotProd instructions
// for the microring dot-product core, as the host software would do it:
//   layer 1: LOAD.V each sample (VLEN 4) and each weight row, DotProd per
//            (sample, neuron); the host stores the 320 scalars neuron-major;
//            then per neuron LOAD.V the 32 batch values, ADD.VS the bias,
//            PRELU.V with alpha 0 (ReLU) and STORE.V back;
//   layer 2: per sample LOAD.V with STRIDE 32 gathers its 10 hidden values,
//            three DotProd give the logits, which the host stores;
//   output : per sample LOAD.V the 3 logits and MAX.V returns the largest.
// Inputs, weights and biases are random Q8.8 values; the expected hidden
// values, logits and maxima are computed in the testbench with the same
// fixed-point rules (products shifted by 8, dot products saturated to 16 bits).
// The cycle split reported by the performance counters is printed at the end.
module tb_mlp_iris;
  import fiona_pkg::*;
  localparam int NB = 32, NIN = 4, NH = 10, NO = 3, DEPTH = 4096;
  localparam int AX = 0, AW1 = 256, AB1 = 320, AW2 = 384, AB2 = 448, AH = 512, AO = 1024;

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
  photonic_model #(.LATENCY(8)) u_ph (.*);

  always #5 clk = ~clk;
  assign resp_ready = 1'b1;

  int checks = 0, failures = 0;

  initial begin
    #20000000;
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

  logic [15:0] x [NB][NIN], w1 [NH][NIN], b1 [NH], w2 [NO][NH], b2 [NO];
  logic [15:0] h [NH][NB], o [NB][NO];

  initial begin
    logic [31:0] d;
    int t0;
    cmd_valid = 0; cmd = '0;
    // data: features 0..8, weights and biases -1..1 (Q8.8)
    for (int n = 0; n < NB; n++) for (int f = 0; f < NIN; f++) x[n][f] = 16'($urandom_range(0, 2047));
    for (int j = 0; j < NH; j++) begin
      for (int f = 0; f < NIN; f++) w1[j][f] = 16'($urandom_range(0, 511) - 256);
      b1[j] = 16'($urandom_range(0, 511) - 256);
    end
    for (int k = 0; k < NO; k++) begin
      for (int j = 0; j < NH; j++) w2[k][j] = 16'($urandom_range(0, 511) - 256);
      b2[k] = 16'($urandom_range(0, 511) - 256);
    end
    for (int i = 0; i < DEPTH; i++) u_mem.mem[i] = '0;
    for (int n = 0; n < NB; n++) for (int f = 0; f < NIN; f++) u_mem.mem[AX + n * NIN + f] = x[n][f];
    for (int j = 0; j < NH; j++) for (int f = 0; f < NIN; f++) u_mem.mem[AW1 + j * NIN + f] = w1[j][f];
    for (int k = 0; k < NO; k++) for (int j = 0; j < NH; j++) u_mem.mem[AW2 + k * NH + j] = w2[k][j];
    // reference model
    for (int j = 0; j < NH; j++)
      for (int n = 0; n < NB; n++) begin
        longint acc;
        logic [15:0] z;
        acc = 0;
        for (int f = 0; f < NIN; f++) acc += sx(x[n][f]) * sx(w1[j][f]);
        z = sat(acc) + b1[j];
        h[j][n] = z[15] ? 16'd0 : z;
      end
    for (int n = 0; n < NB; n++)
      for (int k = 0; k < NO; k++) begin
        longint acc;
        acc = 0;
        for (int j = 0; j < NH; j++) acc += sx(h[j][n]) * sx(w2[k][j]);
        o[n][k] = sat(acc) + b2[k];
      end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = $time;

    // ---- layer 1: weights in v10..v19, sample in v1 ----
    set_vlen(NIN);
    for (int j = 0; j < NH; j++) issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'(10 + j)), 32'(AW1 + j * NIN), 0, d);
    for (int n = 0; n < NB; n++) begin
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd1), 32'(AX + n * NIN), 0, d);
      for (int j = 0; j < NH; j++) begin
        issue(mk(F_DOTPROD, 5'(10 + j), 5'd1, 1, 0, 0, 5'd5), 0, 0, d);
        u_mem.mem[AH + j * NB + n] = d[15:0];   // host store
      end
    end
    // bias and ReLU over the batch, neuron by neuron
    set_vlen(NB);
    for (int j = 0; j < NH; j++) begin
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd2), 32'(AH + j * NB), 0, d);
      issue(mk(F_ADDVS, 5'd3, 5'd2, 0, 0, 1, 5'd2), 0, {16'd0, b1[j]}, d);
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

    // ---- layer 2: weights in v20..v22, gathered hidden vector in v1 ----
    set_vlen(NH);
    for (int k = 0; k < NO; k++) issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'(20 + k)), 32'(AW2 + k * NH), 0, d);
    set_stride(NB);
    for (int n = 0; n < NB; n++) begin
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd1), 32'(AH + n), 0, d);
      for (int k = 0; k < NO; k++) begin
        issue(mk(F_DOTPROD, 5'(20 + k), 5'd1, 1, 0, 0, 5'd5), 0, 0, d);
        u_mem.mem[AO + n * 4 + k] = d[15:0] + b2[k];   // host adds the bias
      end
    end
    // ---- argmax value per sample ----
    set_stride(1);
    set_vlen(NO);
    for (int n = 0; n < NB; n++) begin
      int best;
      issue(mk(F_LOADV, 0, 5'd1, 0, 1, 0, 5'd3), 32'(AO + n * 4), 0, d);
      issue(mk(F_MINMAX, 5'd0, 5'd3, 1, 0, 0, 5'd6), 0, 0, d);
      best = int'(sx(o[n][0]));
      for (int k = 1; k < NO; k++) if (sx(o[n][k]) > best) best = int'(sx(o[n][k]));
      checks++;
      if (d !== 32'(best)) begin
        failures++;
        if (failures < 10) $display("sample %0d: max logit %0d expected %0d", n, int'(d), best);
      end
    end
    wait_idle();
    checks++;
    if (u_ph.n_ops != NB * (NH + NO)) begin failures++; $display("%0d photonic ops, expected %0d", u_ph.n_ops, NB * (NH + NO)); end
    $display("MLP-Iris batch %0d: %0d instructions, %0d cycles; pOps %0d, eOps %0d, Mem %0d cycles",
             NB, perf_insts, ($time - t0) / 10, perf_pops, perf_eops, perf_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
