// se_register: SE register file.
//
// Keeps the most recently decoded value of each syntax-element type. Values
// that steer later parsing decisions are read from here, and because a value
// is only overwritten when the next SE of the same type has been decoded, the
// entry still holds the neighbour's value (for example the coded_block_flag of
// the previously decoded, left-hand block) while the current one is being
// decoded. The SE predictor uses exactly that to guess the next SE type, so no
// separate neighbour storage is needed.
//
// Interface: one write port (wr_en_i with type and value, at the clock edge)
// and two combinational read ports, each addressed by SE type (the decoder
// reads the last coded_block_flag and the last mb_skip_flag). clear_i empties all entries at
// the start of a slice.
//
// The architecture gives the SE register's role. One entry per SE type is this
// design's own organisation.
module se_register
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear_i,
  input  logic        wr_en_i,
  input  se_e         wr_se_i,
  input  logic [15:0] wr_value_i,
  input  se_e         rd_se_i,
  output logic [15:0] rd_value_o,
  input  se_e         rd2_se_i,
  output logic [15:0] rd2_value_o
);

  logic [15:0] val_q [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) val_q[i] <= '0;
    end else if (clear_i) begin
      for (int i = 0; i < 8; i++) val_q[i] <= '0;
    end else if (wr_en_i) begin
      val_q[wr_se_i] <= wr_value_i;
    end
  end

  assign rd_value_o  = val_q[rd_se_i];
  assign rd2_value_o = val_q[rd2_se_i];

endmodule
