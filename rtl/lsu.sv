// lsu: load/store unit of FIONA-V.
//
// Moves vectors between memory (the Rocket core's L1 data cache) and FIONA-V:
//   LOAD.V  : VD[i] = Mem[RS1 + i*STRIDE]                 (LS_LOAD)
//   STORE.V : Mem[RS1 + i*STRIDE] = VS2[i]                (LS_STORE)
//   SET.R MAT: MAT[RS2 + i] = Mem[RS1 + i]                (LS_MAT)
// for i = 0 .. vlen-1. Memory is addressed in 16-bit elements.
//
// The unit issues one element request at a time on a valid/ready request
// port. A write is complete when its request is accepted. A read waits for
// mem_resp_valid, then presents the element on elem_we/elem_idx/elem_data for
// one cycle: elem_idx is the vector lane (LS_LOAD) or the flat row-major MAT
// index RS2+i wrapped to the matrix size (LS_MAT). The address advances by
// adding the stride (or 1), so no multiplier is needed.
//
// Timing: a start pulse while busy is low latches the operands. With a memory
// that accepts at once and answers a read in the cycle after, a store takes
// one cycle per element and a load two; done pulses one cycle after the last
// element. vlen = 0 finishes at once.
//
// The three transfers come from the document's instruction table. The element
// addressing, the single outstanding request and the port handshake are this
// design's.
module lsu
  import fiona_pkg::*;
#(
  parameter int unsigned NELEM = fiona_pkg::FV_NELEM,
  parameter int unsigned EW    = fiona_pkg::FV_EW,
  parameter int unsigned MATN  = fiona_pkg::FV_MATN,
  localparam int unsigned VLW  = $clog2(NELEM+1),
  localparam int unsigned MIW  = $clog2(MATN*MATN)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  lsu_op_e                   op,
  input  logic [31:0]               base,
  input  logic [31:0]               stride,
  input  logic [MIW-1:0]            mat_base,
  input  logic [VLW-1:0]            vlen,
  input  logic [NELEM-1:0][EW-1:0]  vdata,
  output logic                      busy,
  output logic                      done,
  // memory port
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output mem_req_t                  mem_req,
  input  logic                      mem_resp_valid,
  input  logic [EW-1:0]             mem_resp_rdata,
  // loaded element
  output logic                      elem_we,
  output logic [MIW-1:0]            elem_idx,
  output logic [EW-1:0]             elem_data
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_DONE} state_e;
  state_e state;

  lsu_op_e                  op_q;
  logic [31:0]              addr_q, step_q;
  logic [MIW-1:0]           mat_q;
  logic [VLW-1:0]           vlen_q, idx;
  logic [NELEM-1:0][EW-1:0] vdata_q;
  logic                     last;

  assign last = (idx + 1'b1 == vlen_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      op_q      <= LS_LOAD;
      addr_q    <= '0;
      step_q    <= '0;
      mat_q     <= '0;
      vlen_q    <= '0;
      idx       <= '0;
      vdata_q   <= '0;
      elem_we   <= 1'b0;
      elem_idx  <= '0;
      elem_data <= '0;
    end else begin
      elem_we <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_q    <= op;
          addr_q  <= base;
          step_q  <= (op == LS_MAT) ? 32'd1 : stride;
          mat_q   <= mat_base;
          vlen_q  <= vlen;
          vdata_q <= vdata;
          idx     <= '0;
          state   <= (vlen == '0) ? S_DONE : S_REQ;
        end
        S_REQ: if (mem_req_ready) begin
          if (op_q == LS_STORE) begin
            addr_q <= addr_q + step_q;
            idx    <= idx + 1'b1;
            if (last) state <= S_DONE;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: if (mem_resp_valid) begin
          elem_we   <= 1'b1;
          elem_data <= mem_resp_rdata;
          elem_idx  <= (op_q == LS_MAT) ? MIW'(mat_q + MIW'(idx)) : MIW'(idx);
          addr_q    <= addr_q + step_q;
          idx       <= idx + 1'b1;
          state     <= last ? S_DONE : S_REQ;
        end
        default: state <= S_IDLE;   // S_DONE
      endcase
    end
  end

  always_comb begin
    mem_req_valid = (state == S_REQ);
    mem_req.addr  = addr_q;
    mem_req.we    = (op_q == LS_STORE);
    mem_req.wdata = vdata_q[idx[VLW-2:0]];
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

endmodule
