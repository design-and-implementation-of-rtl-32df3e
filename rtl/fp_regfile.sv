// Floating-point register file of the write-back stage.
//
// NREGS registers of W bits (32 x 32 by default: a 5-bit write-back address
// and 32-bit data, as in the document's waveform). One write port, driven by
// the write-back stage's address and data and enabled by wb_en_i, writes on
// the rising clock edge. wb_out_o shows the register at the write-back
// address, the document's observation port. NREAD read ports serve the
// floating-point operands in the decode stage.
//
// Reads are combinational and write-through: a read of the register being
// written in the same cycle returns the new data, so an instruction three
// stages behind a producer needs no forwarding. Reset clears every register.
// The read ports, their number and the write-through are this design's
// choices; the document gives only the write side and the observation output.
module fp_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  parameter int unsigned NREAD = 2,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wb_en_i,
  input  logic [AW-1:0] wb_addr_i,
  input  logic [W-1:0]  wb_data_i,
  output logic [W-1:0]  wb_out_o,
  input  logic [AW-1:0] rd_addr_i [NREAD],
  output logic [W-1:0]  rd_data_o [NREAD]
);

  logic [W-1:0] regs_q [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs_q[i] <= '0;
    end else if (wb_en_i) begin
      regs_q[wb_addr_i] <= wb_data_i;
    end
  end

  function automatic logic [W-1:0] rd(logic [AW-1:0] a);
    return (wb_en_i && !rst && a == wb_addr_i) ? wb_data_i : regs_q[a];
  endfunction

  assign wb_out_o = rd(wb_addr_i);

  always_comb begin
    for (int p = 0; p < NREAD; p++) rd_data_o[p] = rd(rd_addr_i[p]);
  end

endmodule
