// mem_model: behavioural model of the memory seen by FIONA-V's load/store
// port (in the real system, the Rocket core's L1 data cache). Not for
// synthesis.
//
// DEPTH 16-bit elements, addressed in elements (address taken modulo DEPTH).
// With STALLS = 1 the model holds mem_req_ready low on random cycles and
// answers reads after 1 to 3 cycles; with STALLS = 0 it always accepts and
// answers a read in the next cycle; a testbench may change the run-time copy
// `stalls` of the parameter at any time. A write updates the array when its request
// is accepted. Testbenches fill and inspect the array `mem` directly. Counts
// the stall cycles it inserted in n_stalls.
module mem_model #(
  parameter int DEPTH  = 4096,
  parameter bit STALLS = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mem_req_valid,
  output logic                 mem_req_ready,
  input  fiona_pkg::mem_req_t  mem_req,
  output logic                 mem_resp_valid,
  output logic [15:0]          mem_resp_rdata
);
  logic [15:0] mem [DEPTH];
  int          wait_cnt;
  logic        pending;
  logic [15:0] pend_data;
  int          n_stalls;
  bit          stalls = STALLS;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      mem_req_ready  <= 1'b1;
      mem_resp_valid <= 1'b0;
      pending        <= 1'b0;
      wait_cnt       <= 0;
      n_stalls       <= 0;
    end else begin
      mem_resp_valid <= 1'b0;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req.we) mem[mem_req.addr % DEPTH] <= mem_req.wdata;
        else if (!stalls || $urandom_range(0, 2) == 0) begin
          mem_resp_valid <= 1'b1;
          mem_resp_rdata <= mem[mem_req.addr % DEPTH];
        end else begin
          pending   <= 1'b1;
          pend_data <= mem[mem_req.addr % DEPTH];
          wait_cnt  <= $urandom_range(0, 1);
        end
      end
      if (pending) begin
        if (wait_cnt == 0) begin
          mem_resp_valid <= 1'b1;
          mem_resp_rdata <= pend_data;
          pending        <= 1'b0;
        end else wait_cnt <= wait_cnt - 1;
      end
      mem_req_ready <= stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (mem_req_valid && !mem_req_ready) n_stalls <= n_stalls + 1;
    end
  end
endmodule
