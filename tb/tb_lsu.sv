// tb_lsu: self-checking test of the load/store unit against mem_model.
//
// Random strided loads, strided stores and MAT fills with random bases,
// strides and lengths, first with a memory that stalls at random, then with
// one that never stalls. Loaded elements are compared with the memory image,
// stores by comparing the whole memory with the image updated in the
// testbench, and MAT fills by index and value. Without stalls the cycle count
// from start to done must be vlen + 1 for a store and 2*vlen + 1 for a load.
module tb_lsu;
  import fiona_pkg::*;
  localparam int NELEM = 32, EW = 16, DEPTH = 4096;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  lsu_op_e op;
  logic [31:0] base, stride;
  logic [9:0] mat_base;
  logic [5:0] vlen;
  logic [NELEM-1:0][EW-1:0] vdata;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  logic [EW-1:0] mem_resp_rdata;
  logic elem_we;
  logic [9:0] elem_idx;
  logic [EW-1:0] elem_data;
  int checks = 0, failures = 0;
  logic [15:0] image [DEPTH];

  lsu dut (.*);
  mem_model #(.DEPTH(DEPTH)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    int cyc, got, lat;
    @(negedge clk);
    op = lsu_op_e'(n % 3);
    base = $urandom();
    stride = (n % 5 == 0) ? 32'd0 : (($urandom_range(0, 1) != 0) ? 32'($urandom_range(1, 9)) : -32'($urandom_range(1, 9)));
    if (op == LS_STORE) stride = stride | 32'd1;   // distinct addresses
    mat_base = 10'($urandom());
    vlen = (n < 6) ? 6'(n % 2) : 6'($urandom_range(0, 32));
    for (int i = 0; i < NELEM; i++) vdata[i] = EW'($urandom());
    for (int i = 0; i < DEPTH; i++) image[i] = u_mem.mem[i];
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; got = 0;
    while (1) begin
      if (elem_we) begin
        logic [31:0] ad;
        int ei;
        ad = (op == LS_MAT) ? base + got : base + got * stride;
        ei = (op == LS_MAT) ? (int'(mat_base) + got) % 1024 : got;
        checks += 2;
        if (elem_data !== image[ad % DEPTH]) begin
          failures++;
          if (failures < 10) $display("%s elem %0d: %h expected %h", op.name(), got, elem_data, image[ad % DEPTH]);
        end
        if (int'(elem_idx) != ei) failures++;
        got++;
      end
      if (done) break;
      @(negedge clk); cyc++;
    end
    if (op == LS_STORE) begin
      for (int i = 0; i < vlen; i++) image[(base + i * stride) % DEPTH] = vdata[i];
      checks++;
      for (int i = 0; i < DEPTH; i++)
        if (u_mem.mem[i] !== image[i]) begin failures++; $display("store: mem[%0d] wrong", i); break; end
    end else begin
      checks++;
      if (got != vlen) begin failures++; $display("%s: %0d elements for vlen %0d", op.name(), got, vlen); end
    end
    if (!u_mem.stalls) begin
      lat = (op == LS_STORE) ? int'(vlen) + 1 : 2 * int'(vlen) + 1;
      checks++;
      if (cyc != lat) begin failures++; $display("%s vlen %0d: %0d cycles, expected %0d", op.name(), vlen, cyc, lat); end
    end
  endtask

  initial begin
    start = 0; op = LS_LOAD; base = 0; stride = 1; mat_base = 0; vlen = 0; vdata = '0;
    for (int i = 0; i < DEPTH; i++) u_mem.mem[i] = 16'($urandom());
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) run(n);
    checks++;
    if (u_mem.n_stalls == 0) begin failures++; $display("no memory stall happened"); end
    u_mem.stalls = 1'b0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 120; n++) run(n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
