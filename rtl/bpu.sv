// Branch prediction unit: a direct-mapped branch target buffer.
//
// Each of ENTRIES entries holds a valid bit, the upper PC bits as a tag, the
// last seen target address and a one-bit "taken last time" history. The
// entry is chosen by the word-address bits just above the byte offset,
// pc[IDX_W+1:2]. A lookup is synchronous: the PC presented in one cycle gives
// pred_taken_o / pred_target_o in the next, which is what lets the next-PC
// logic use the prediction without a combinational loop through the fetch
// address. A prediction is "taken" only when the entry is valid, its tag
// matches and its history bit says taken.
//
// The table is written when a branch resolves in the memory stage
// (upd_valid_i): tag, target and outcome are stored, overwriting whatever
// entry sat at that index. A lookup and an update of the same entry in the
// same cycle return the entry's old contents.
//
// The document gives only the unit's role (a predicted PC for the PC the
// issuing unit presents, corrected from the memory stage); the table
// organisation, its size, the one-bit history and the synchronous read are
// this design's choices. Reset clears the valid bits only.
module bpu #(
  parameter int unsigned AW      = 32,
  parameter int unsigned ENTRIES = 16
) (
  input  logic          clk,
  input  logic          rst,
  // lookup
  input  logic [AW-1:0] lookup_pc_i,
  output logic          pred_taken_o,
  output logic [AW-1:0] pred_target_o,
  // update from the memory stage
  input  logic          upd_valid_i,
  input  logic [AW-1:0] upd_pc_i,
  input  logic          upd_taken_i,
  input  logic [AW-1:0] upd_target_i
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = AW - IDX_W - 2;

  logic [ENTRIES-1:0]   valid_q;
  logic [ENTRIES-1:0]   taken_q;
  logic [TAG_W-1:0]     tag_q    [ENTRIES];
  logic [AW-1:0]        target_q [ENTRIES];

  logic [IDX_W-1:0] lk_idx, up_idx;
  logic [TAG_W-1:0] lk_tag, up_tag;

  assign lk_idx = lookup_pc_i[IDX_W+1:2];
  assign lk_tag = lookup_pc_i[AW-1:IDX_W+2];
  assign up_idx = upd_pc_i[IDX_W+1:2];
  assign up_tag = upd_pc_i[AW-1:IDX_W+2];

  // table update
  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
      taken_q <= '0;
    end else if (upd_valid_i) begin
      valid_q[up_idx] <= 1'b1;
      taken_q[up_idx] <= upd_taken_i;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid_i) begin
      tag_q[up_idx]    <= up_tag;
      target_q[up_idx] <= upd_target_i;
    end
  end

  // synchronous lookup
  always_ff @(posedge clk) begin
    if (rst) begin
      pred_taken_o  <= 1'b0;
      pred_target_o <= '0;
    end else begin
      pred_taken_o  <= valid_q[lk_idx] && taken_q[lk_idx] && (tag_q[lk_idx] == lk_tag);
      pred_target_o <= target_q[lk_idx];
    end
  end

endmodule
