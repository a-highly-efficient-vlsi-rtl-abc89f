// cm_init: context-model initialisation at the start of a slice.
//
// Steps through ctxIdx 0..459 (skipping 276, end_of_slice_flag, which has no
// model), one per cycle. For each it reads the (m, n) pair of the current
// cabac_init_idc / slice type from the initialisation table (init_ctx_o ->
// init_m_i, init_n_i, combinational) and computes, as in H.264/AVC,
//   preCtxState = Clip3(1, 126, ((m * Clip3(0, 51, SliceQPY)) >> 4) + n)
//   preCtxState <= 63 ? (state = 63 - pre, MPS = 0) : (state = pre - 64, MPS = 1)
// and writes the result to the SRAM or register half of the CM memory at the
// address given by the reorganised memory map. busy_o is high from start_i
// until the last write: 459 writes in 459 cycles.
//
// Initialising every CM at slice start follows the architecture. The formula is
// the standard's. The rate of one CM per cycle and the external (m, n) port are
// this design's own choices.
module cm_init
  import cabac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [5:0]        qp_i,
  output logic [8:0]        init_ctx_o,
  input  logic signed [7:0] init_m_i,
  input  logic signed [7:0] init_n_i,
  output logic              busy_o,
  output logic              wr_sram_o,
  output logic              wr_reg_o,
  output logic [7:0]        wr_addr_o,
  output cm_t               wr_data_o
);

  logic       busy_q;
  logic [8:0] ctx_q;
  logic [5:0] qp_q;
  cm_loc_t    loc;
  int         pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      ctx_q  <= '0;
      qp_q   <= '0;
    end else if (start_i) begin
      busy_q <= 1'b1;
      ctx_q  <= '0;
      qp_q   <= (qp_i > 6'd51) ? 6'd51 : qp_i;
    end else if (busy_q) begin
      if (ctx_q == 9'd459) busy_q <= 1'b0;
      ctx_q <= (ctx_q == 9'd275) ? 9'd277 : ctx_q + 9'd1;
    end
  end

  always_comb begin
    pre = ((int'(init_m_i) * int'(qp_q)) >>> 4) + int'(init_n_i);
    if (pre < 1)   pre = 1;
    if (pre > 126) pre = 126;
    if (pre <= 63) wr_data_o = '{state: 6'(63 - pre), mps: 1'b0};
    else           wr_data_o = '{state: 6'(pre - 64), mps: 1'b1};
    loc = cm_loc(ctx_q);
  end

  assign init_ctx_o = ctx_q;
  assign busy_o     = busy_q;
  assign wr_sram_o  = busy_q && !loc.in_reg;
  assign wr_reg_o   = busy_q && loc.in_reg;
  assign wr_addr_o  = loc.addr;

endmodule
