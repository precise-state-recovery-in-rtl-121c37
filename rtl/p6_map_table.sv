// p6_map_table: register rename table with "ready-in-ROB" bits (T+).
//
// One entry per architectural register: a ROB tag and a plus bit.
//   tag == 0            the value is in the register file
//   tag != 0, plus = 1  the value is ready in that ROB entry ("T+")
//   tag != 0, plus = 0  the value is not produced yet; wait for the tag
// Updates, all applied at the clock edge:
//   complete (CDB)  entries whose tag equals the CDB tag get plus = 1
//   retire          the entry of the retiring register is cleared to 0 if it
//                   still holds the retiring tag (a younger writer may own it)
//   dispatch        the destination's entry gets the new tag with plus = 0;
//                   this wins over the two above
//   flush           every entry goes to 0: all values are in the register file
// The two source read ports are combinational and show the state before the
// edge.  The update rules are the ones of the P6 slides; the priority between
// same-cycle updates is this design's choice.
module p6_map_table
  import p6_pkg::*;
(
  input  logic  clk_i,
  input  logic  rst_ni,
  input  logic  flush_i,
  // dispatch
  input  logic  disp_we_i,
  input  reg_t  disp_rd_i,
  input  tag_t  disp_tag_i,
  input  reg_t  rs1_i,
  output tag_t  rs1_tag_o,
  output logic  rs1_plus_o,
  input  reg_t  rs2_i,
  output tag_t  rs2_tag_o,
  output logic  rs2_plus_o,
  // complete
  input  logic  cdb_valid_i,
  input  tag_t  cdb_tag_i,
  // retire
  input  logic  ret_we_i,
  input  reg_t  ret_rd_i,
  input  tag_t  ret_tag_i
);

  tag_t tag_q  [NUM_REGS];
  logic plus_q [NUM_REGS];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int r = 0; r < NUM_REGS; r++) begin
        tag_q[r]  <= '0;
        plus_q[r] <= 1'b0;
      end
    end else if (flush_i) begin
      for (int r = 0; r < NUM_REGS; r++) begin
        tag_q[r]  <= '0;
        plus_q[r] <= 1'b0;
      end
    end else begin
      for (int r = 0; r < NUM_REGS; r++) begin
        if (disp_we_i && disp_rd_i == reg_t'(r)) begin
          tag_q[r]  <= disp_tag_i;
          plus_q[r] <= 1'b0;
        end else if (ret_we_i && ret_rd_i == reg_t'(r) && tag_q[r] == ret_tag_i) begin
          tag_q[r]  <= '0;
          plus_q[r] <= 1'b0;
        end else if (cdb_valid_i && tag_q[r] != '0 && tag_q[r] == cdb_tag_i) begin
          plus_q[r] <= 1'b1;
        end
      end
    end
  end

  assign rs1_tag_o  = tag_q[rs1_i];
  assign rs1_plus_o = plus_q[rs1_i];
  assign rs2_tag_o  = tag_q[rs2_i];
  assign rs2_plus_o = plus_q[rs2_i];

endmodule
