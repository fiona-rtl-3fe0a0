// tb_fiona_v: end-to-end test of the FIONA-V coprocessor at its default size.
//
// The testbench plays the Rocket core: it sends RoCC commands, takes the
// responses (holding resp_ready low on random cycles), and serves memory with
// mem_model and the photonic core with photonic_model, both stalling at
// random. An instruction-level reference model of the whole custom ISA
// (vector registers, STRIDE/VLEN/VMASK/MAT, memory) runs beside the design:
// every scalar response is compared when it arrives, the MAT weights are
// compared whenever they are presented to the photonic core, and at random
// points the testbench stores all vector registers it uses to a scratch area
// of memory (SET.R VLEN = 32, SET.R STRIDE = 1, STORE.V, then the old values
// restored) and compares them and the whole memory image with the model.
// SIGMOID.V and TANH.V results, read back the same way, are checked against
// the real functions within a tolerance and then taken into the model.
//
// The stream covers every instruction. The test counts how often each
// instruction and each mechanism happened (memory stall, DAC stall, response
// back-pressure, command held off while busy, VLEN above 32, VLEN below 32,
// write to v0, divide by zero, unknown instruction) and counts a failure for
// any that never did. A directed part checks that back-to-back ADD.V commands
// are accepted every 2 cycles and that the performance counters agree with the
// instruction count.
module tb_fiona_v;
  import fiona_pkg::*;
  localparam int NELEM = 32, EW = 16, MATN = 32, FRAC = 8, DEPTH = 8192, SCRATCH = 4096;
  localparam int NINST = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  logic [EW-1:0] mem_resp_rdata;
  logic dac_valid, dac_ready, adc_valid;
  pop_e dac_op;
  logic [NELEM-1:0][EW-1:0] dac_a, dac_b, adc_data;
  logic [MATN-1:0][MATN-1:0][EW-1:0] dac_mat;
  logic [31:0][31:0] vmask;
  logic [31:0] perf_pops, perf_eops, perf_mem, perf_insts;

  fiona_v dut (.*);
  mem_model #(.DEPTH(DEPTH)) u_mem (.*);
  photonic_model #(.NELEM(NELEM), .MATN(MATN), .FRAC(FRAC), .LATENCY(6)) u_ph (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [NELEM-1:0][EW-1:0] m_v [32];
  logic [31:0] m_stride, m_vlen;
  logic [31:0][31:0] m_vmask;
  logic [MATN-1:0][MATN-1:0][EW-1:0] m_mat;
  logic [15:0] m_mem [DEPTH];

  function automatic int vl();
    return (m_vlen > 32) ? 32 : int'(m_vlen);
  endfunction
  function automatic longint sx(logic [15:0] v);
    return longint'(signed'(v));
  endfunction
  function automatic logic [15:0] sat(longint v);
    v = v >>> FRAC;
    if (v > 32767) return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction
  function automatic real fx(logic [15:0] v);
    return real'(int'(signed'(v))) / 256.0;
  endfunction

  // ---------------- mechanism counters ----------------
  typedef enum int {K_ADDV, K_SUBV, K_ADDVS, K_SUBVS, K_MULVS, K_DIVVS, K_SHUFFLE,
                    K_MAX, K_MIN, K_PRELU, K_TANH, K_SIGMOID, K_DOTPROD, K_MVMUL,
                    K_CONV1D, K_LOADV, K_STOREV, K_SET_STRIDE, K_SET_VLEN, K_SET_VMASK,
                    K_SET_MAT, K_ILLEGAL, NKIND} kind_e;
  int n_kind [NKIND];
  int n_resp_stall = 0, n_cmd_held = 0, n_vlen_clamp = 0, n_vlen_short = 0;
  int n_v0_write = 0, n_div0 = 0, n_dac_stall = 0, n_issued = 0, n_mat_seen = 0;

  always @(posedge clk) begin
    if (rst_n && resp_valid && !resp_ready) n_resp_stall++;
    if (rst_n && cmd_valid && !cmd_ready) n_cmd_held++;
    if (rst_n && dac_valid && !dac_ready) n_dac_stall++;
    if (rst_n && dac_valid && dac_ready) begin
      checks++;
      n_mat_seen++;
      if (dac_mat !== m_mat) begin failures++; $display("MAT presented to the photonic core differs"); end
    end
  end

  // random response back-pressure
  always @(negedge clk) resp_ready <= ($urandom_range(0, 2) == 0);

  // ---------------- command issue ----------------
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
    n_issued++;
    data = '0;
    if (in.xd) begin
      @(posedge clk);
      while (!(resp_valid && resp_ready)) @(posedge clk);
      data = resp.data;
      checks++;
      if (resp.rd !== in.rd) begin failures++; $display("response rd %0d expected %0d", resp.rd, in.rd); end
    end
  endtask

  // read vector register r through STORE.V into the scratch area
  task automatic read_vreg(logic [4:0] r, output logic [NELEM-1:0][EW-1:0] v);
    logic [31:0] d;
    issue(mk(F_SETR, 5'd0, 5'd5, 0, 1, 0, SETR_VLEN), 32'd32, 0, d);
    issue(mk(F_SETR, 5'd0, 5'd5, 0, 1, 0, SETR_STRIDE), 32'd1, 0, d);
    issue(mk(F_STOREV, r, 5'd7, 0, 1, 0, 5'd0), 32'(SCRATCH + 32 * r), 0, d);
    issue(mk(F_SETR, 5'd0, 5'd5, 0, 1, 0, SETR_STRIDE), m_stride, 0, d);
    issue(mk(F_SETR, 5'd0, 5'd5, 0, 1, 0, SETR_VLEN), m_vlen, 0, d);
    wait (!busy);
    @(negedge clk);
    for (int i = 0; i < NELEM; i++) begin
      v[i] = u_mem.mem[SCRATCH + 32 * r + i];
      m_mem[SCRATCH + 32 * r + i] = m_v[r][i];
    end
  endtask

  task automatic compare_state(string when);
    logic [NELEM-1:0][EW-1:0] v;
    for (int r = 0; r < 8; r++) begin
      read_vreg(5'(r), v);
      checks++;
      if (v !== m_v[r]) begin
        failures++;
        if (failures < 20) $display("%s: v%0d differs", when, r);
      end
    end
    checks += 2;
    if (vmask !== m_vmask) begin failures++; $display("%s: VMASK differs", when); end
    for (int i = 0; i < DEPTH; i++)
      if (u_mem.mem[i] !== m_mem[i]) begin failures++; $display("%s: mem[%0d] differs", when, i); break; end
  endtask

  // ---------------- one random instruction ----------------
  task automatic step(int n);
    kind_e k;
    logic [4:0] vd, v1, v2;
    logic [31:0] r1, r2, data, expd;
    logic [NELEM-1:0][EW-1:0] a, b, t;
    rocc_inst_t in;
    bit xd_chk;
    k  = kind_e'($urandom_range(0, NKIND - 1));
    vd = 5'($urandom_range(0, 7));           // v0 included on purpose
    v1 = 5'($urandom_range(0, 7));
    v2 = 5'($urandom_range(0, 7));
    r1 = $urandom();
    r2 = $urandom();
    a = m_v[v1]; b = m_v[v2]; t = m_v[vd];
    xd_chk = 0; expd = '0;
    if (vl() < 32) n_vlen_short++;
    if (m_vlen > 32) n_vlen_clamp++;
    unique case (k)
      K_ADDV, K_SUBV, K_ADDVS, K_SUBVS: begin
        logic [6:0] f;
        f = (k == K_ADDV) ? F_ADDV : (k == K_SUBV) ? F_SUBV : (k == K_ADDVS) ? F_ADDVS : F_SUBVS;
        in = mk(f, v2, v1, 0, 0, (k == K_ADDVS || k == K_SUBVS), vd);
        for (int i = 0; i < vl(); i++)
          case (k)
            K_ADDV:  t[i] = a[i] + b[i];
            K_SUBV:  t[i] = a[i] - b[i];
            K_ADDVS: t[i] = a[i] + r2[15:0];
            default: t[i] = a[i] - r2[15:0];
          endcase
      end
      K_MULVS, K_DIVVS: begin
        if ($urandom_range(0, 5) == 0) r2 = '0;
        if (k == K_DIVVS && r2[15:0] == 0 && vl() > 0) n_div0++;
        in = mk((k == K_MULVS) ? F_MULVS : F_DIVVS, v2, v1, 0, 0, 1, vd);
        for (int i = 0; i < vl(); i++) begin
          longint x, s, q;
          x = sx(a[i]); s = sx(r2[15:0]);
          if (k == K_MULVS) t[i] = 16'((x * s) >>> FRAC);
          else if (s == 0) t[i] = '1;
          else begin
            q = ((x < 0 ? -x : x) << FRAC) / (s < 0 ? -s : s);
            t[i] = 16'(((x < 0) != (s < 0)) ? -q : q);
          end
        end
      end
      K_SHUFFLE: begin
        in = mk(F_SHUFFLE, v2, v1, 0, 0, 0, vd);
        for (int i = 0; i < vl(); i++) t[i] = a[b[i] % 32];
      end
      K_MAX, K_MIN: begin
        int best;
        in = mk(F_MINMAX, (k == K_MAX) ? 5'd0 : 5'd1, v1, 1, 0, 0, 5'($urandom()));
        best = 0;
        for (int i = 0; i < vl(); i++)
          if (i == 0 || (k == K_MAX && sx(a[i]) > best) || (k == K_MIN && sx(a[i]) < best)) best = int'(sx(a[i]));
        xd_chk = 1; expd = 32'(best);
      end
      K_PRELU: begin
        r2 = 32'($urandom_range(0, 300));
        in = mk(F_NLU, v2, v1, 0, 0, 1, vd);
        for (int i = 0; i < vl(); i++)
          t[i] = a[i][15] ? 16'((sx(a[i]) * sx(r2[15:0])) >>> FRAC) : a[i];
      end
      K_TANH, K_SIGMOID: in = mk(F_NLU, (k == K_TANH) ? 5'd1 : 5'd2, v1, 0, 0, 0, vd);
      K_DOTPROD: begin
        longint acc;
        in = mk(F_DOTPROD, v2, v1, 1, 0, 0, 5'($urandom()));
        acc = 0;
        for (int i = 0; i < vl(); i++) acc += sx(a[i]) * sx(b[i]);
        xd_chk = 1; expd = 32'(signed'(sat(acc)));
      end
      K_MVMUL: begin
        in = mk(F_MVMUL, 5'd0, v1, 0, 0, 0, vd);
        for (int r = 0; r < vl(); r++) begin
          longint acc;
          acc = 0;
          for (int c = 0; c < vl(); c++) acc += sx(m_mat[r][c]) * sx(a[c]);
          t[r] = sat(acc);
        end
      end
      K_CONV1D: begin
        in = mk(F_CONV1D, v2, v1, 0, 0, 0, vd);
        for (int i = 0; i < vl(); i++) begin
          longint acc;
          acc = 0;
          for (int j = 0; j <= i; j++) acc += sx(b[j]) * sx(a[i-j]);
          t[i] = sat(acc);
        end
      end
      K_LOADV: begin
        r1 = 32'($urandom_range(0, SCRATCH - 1));
        in = mk(F_LOADV, 5'd0, 5'd7, 0, 1, 0, vd);
        for (int i = 0; i < vl(); i++) t[i] = m_mem[(r1 + i * m_stride) % DEPTH];
      end
      K_STOREV: begin
        r1 = 32'($urandom_range(0, SCRATCH - 1));
        in = mk(F_STOREV, v2, 5'd7, 0, 1, 0, 5'd0);
        for (int i = 0; i < vl(); i++) m_mem[(r1 + i * m_stride) % DEPTH] = b[i];
      end
      K_SET_STRIDE: begin
        r1 = (n % 3 == 0) ? 32'd1 : 32'($urandom_range(0, 70)) - 32'd35;
        in = mk(F_SETR, 5'd0, 5'd5, 0, 1, 0, SETR_STRIDE);
        m_stride = r1;
      end
      K_SET_VLEN: begin
        case ($urandom_range(0, 3))
          0: r1 = 32'd32;
          1: r1 = 32'($urandom_range(33, 100));
          default: r1 = 32'($urandom_range(0, 32));
        endcase
        in = mk(F_SETR, 5'd0, 5'd5, 0, 1, 0, SETR_VLEN);
        m_vlen = r1;
      end
      K_SET_VMASK: begin
        in = mk(F_SETR, 5'd6, 5'd5, 0, 1, 1, SETR_VMASK);
        m_vmask[r2 % 32] = r1;
      end
      K_SET_MAT: begin
        r1 = 32'($urandom_range(0, SCRATCH - 1));
        r2 = 32'($urandom_range(0, 1023));
        in = mk(F_SETR, 5'd6, 5'd5, 0, 1, 1, SETR_MAT);
      end
      default: begin   // K_ILLEGAL
        in = mk(7'h7f, 5'($urandom()), 5'($urandom()), 1'($urandom()), 0, 0, 5'($urandom()));
        xd_chk = in.xd; expd = '0;
      end
    endcase
    n_kind[k]++;
    if (k == K_SET_MAT) wait (!busy);   // a running MVMul still sees the old MAT
    if (vd == 0 && in.funct7 inside {F_ADDV, F_SUBV, F_ADDVS, F_SUBVS, F_MULVS, F_DIVVS,
                                     F_SHUFFLE, F_NLU, F_MVMUL, F_CONV1D, F_LOADV}) n_v0_write++;
    issue(in, r1, r2, data);
    if (k == K_SET_MAT)
      for (int i = 0; i < vl(); i++) begin
        int idx;
        idx = (int'(r2) + i) % 1024;
        m_mat[idx / 32][idx % 32] = m_mem[(r1 + i) % DEPTH];
      end
    if (xd_chk) begin
      checks++;
      if (data !== expd) begin
        failures++;
        if (failures < 20) $display("inst %0d %s: response %h expected %h", n, k.name(), data, expd);
      end
    end
    if (k == K_TANH || k == K_SIGMOID) begin
      read_vreg(vd, t);
      for (int i = 0; i < vl() && vd != 0; i++) begin
        real x, e;
        x = fx(a[i]);
        e = (k == K_TANH) ? $tanh(x) : 1.0 / (1.0 + $exp(-x));
        checks++;
        if (fx(t[i]) - e > 0.045 || e - fx(t[i]) > 0.045) begin
          failures++;
          if (failures < 20) $display("%s(%f) = %f expected %f", k.name(), x, fx(t[i]), e);
        end
      end
    end
    if (vd != 0 && in.funct7 inside {F_ADDV, F_SUBV, F_ADDVS, F_SUBVS, F_MULVS, F_DIVVS,
                                     F_SHUFFLE, F_NLU, F_MVMUL, F_CONV1D, F_LOADV}) m_v[vd] = t;
    if ($urandom_range(0, 9) == 0) compare_state($sformatf("after inst %0d (%s)", n, k.name()));
  endtask

  initial begin
    logic [31:0] d;
    int t0, t1;
    cmd_valid = 0; cmd = '0;
    for (int r = 0; r < 32; r++) m_v[r] = '0;
    m_stride = 1; m_vlen = 32; m_vmask = '0; m_mat = '0;
    for (int i = 0; i < DEPTH; i++) begin
      u_mem.mem[i] = (i < SCRATCH) ? 16'($urandom_range(0, 2047) - 1024) : '0;   // about -4.0 .. 4.0
      m_mem[i] = u_mem.mem[i];
    end
    for (int k = 0; k < NKIND; k++) n_kind[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fill v1..v7 from memory so the random stream starts from data
    for (int r = 1; r < 8; r++) begin
      issue(mk(F_LOADV, 5'd0, 5'd1, 0, 1, 0, 5'(r)), 32'(r * 64), 0, d);
      for (int i = 0; i < 32; i++) m_v[r][i] = m_mem[r * 64 + i];
    end
    compare_state("after initial loads");
    for (int n = 0; n < NINST; n++) step(n);
    compare_state("at the end");

    // directed: back-to-back ADD.V are accepted every 2 cycles
    issue(mk(F_SETR, 5'd0, 5'd5, 0, 1, 0, SETR_VLEN), 32'd32, 0, d);
    m_vlen = 32;
    wait (!busy);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd.inst = mk(F_ADDV, 5'd2, 5'd1, 0, 0, 0, 5'd3); cmd.rs1 = 0; cmd.rs2 = 0;
    t0 = -1; t1 = 0;
    for (int c = 0; c < 100 && t1 < 10; c++) begin
      @(posedge clk);
      if (cmd_ready) begin
        if (t0 < 0) t0 = c;
        t1++;
        if (t1 == 10) begin
          checks++;
          if (c - t0 != 18) begin failures++; $display("10 ADD.V took %0d cycles between first and last acceptance, expected 18", c - t0); end
        end
      end
    end
    @(negedge clk);
    cmd_valid = 1'b0;
    for (int i = 0; i < 32; i++) m_v[3][i] = m_v[1][i] + m_v[2][i];
    compare_state("after ADD.V burst");

    // performance counters
    checks += 2;
    if (perf_insts != 32'(n_issued + 10)) begin failures++; $display("perf_insts %0d expected %0d", perf_insts, n_issued + 10); end
    if (perf_pops == 0 || perf_eops == 0 || perf_mem == 0) begin failures++; $display("a performance counter stayed 0"); end

    // every instruction and mechanism must have happened
    for (int k = 0; k < NKIND; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("instruction %s never issued", kind_e'(k)); end
    end
    checks += 9;
    if (n_mat_seen == 0)    begin failures++; $display("MAT never presented"); end
    if (u_mem.n_stalls == 0) begin failures++; $display("no memory stall"); end
    if (n_dac_stall == 0)   begin failures++; $display("no DAC stall"); end
    if (n_resp_stall == 0)  begin failures++; $display("no response back-pressure"); end
    if (n_cmd_held == 0)    begin failures++; $display("no command held off while busy"); end
    if (n_vlen_clamp == 0)  begin failures++; $display("VLEN never above 32"); end
    if (n_vlen_short == 0)  begin failures++; $display("VLEN never below 32"); end
    if (n_v0_write == 0)    begin failures++; $display("no write to v0"); end
    if (n_div0 == 0)        begin failures++; $display("no divide by zero"); end
    $display("instructions: %0d, memory stalls %0d, DAC stalls %0d, response stalls %0d, commands held %0d",
             perf_insts, u_mem.n_stalls, n_dac_stall, n_resp_stall, n_cmd_held);
    $display("VLEN>32 %0d, VLEN<32 %0d, v0 writes %0d, divide by zero %0d, photonic ops %0d",
             n_vlen_clamp, n_vlen_short, n_v0_write, n_div0, u_ph.n_ops);
    $display("cycles: pOps %0d eOps %0d Mem %0d", perf_pops, perf_eops, perf_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
