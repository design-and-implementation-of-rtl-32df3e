// Forwarding unit for one execute-stage operand.
//
// A six-input multiplexer, as in the document, whose inputs are the operand
// values of the two pipelines at three points:
//   D0 / D1  pipeline 1 / 2 operand read in the decode stage (ID/EX register)
//   D2 / D3  pipeline 1 / 2 result in the memory stage (EX/MEM register)
//   D4 / D5  pipeline 1 / 2 result in the write-back stage (MEM/WB register)
// and the select logic that drives it. The operand's source register is
// compared with the destination of each instruction in the memory and
// write-back stages; a match selects that result. When both stages match,
// the memory stage wins because it holds the later instruction (the
// document's rule). Without a match the unit passes the decode-stage value
// of its own pipeline (D0 for LANE = 0, D1 for LANE = 1).
//
// Own choices: a register is identified by file and number (reg_tag_t), so
// an integer and a floating-point register of the same number never match;
// integer register x0 is never forwarded; when both pipelines match in the
// same stage, pipeline 2 wins, taking it as the later of a pair. One instance
// serves one operand, so an execution unit with two operands uses two.
//
// Interface: combinational; sel_o is the 3-bit select (0..5 = D0..D5).
module forwarding_unit
  import riscv_sub_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned LANE = 0
) (
  input  logic [W-1:0] d_i [6],
  input  logic         src_valid_i,    // operand comes from a register
  input  reg_tag_t     src_i,
  input  logic         mem_we_i [2],   // pipeline 1/2 memory-stage writes a register
  input  reg_tag_t     mem_rd_i [2],
  input  logic         wb_we_i  [2],
  input  reg_tag_t     wb_rd_i  [2],
  output logic [2:0]   sel_o,
  output logic [W-1:0] data_o
);

  function automatic logic hit(logic we, reg_tag_t rd, reg_tag_t src);
    return we && (rd == src) && (src.is_fp || src.addr != 5'd0);
  endfunction

  always_comb begin
    sel_o = 3'(LANE);
    if (src_valid_i) begin
      if      (hit(mem_we_i[1], mem_rd_i[1], src_i)) sel_o = 3'd3;
      else if (hit(mem_we_i[0], mem_rd_i[0], src_i)) sel_o = 3'd2;
      else if (hit(wb_we_i[1],  wb_rd_i[1],  src_i)) sel_o = 3'd5;
      else if (hit(wb_we_i[0],  wb_rd_i[0],  src_i)) sel_o = 3'd4;
    end
  end

  always_comb begin
    case (sel_o)
      3'd0:    data_o = d_i[0];
      3'd1:    data_o = d_i[1];
      3'd2:    data_o = d_i[2];
      3'd3:    data_o = d_i[3];
      3'd4:    data_o = d_i[4];
      3'd5:    data_o = d_i[5];
      default: data_o = '0;
    endcase
  end

  initial assert (LANE <= 1) else $error("forwarding_unit: LANE must be 0 or 1");

endmodule
