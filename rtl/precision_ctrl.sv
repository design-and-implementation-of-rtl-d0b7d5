// precision_ctrl -- decodes the 2-bit mode select of the RMAC into the
// datapath configuration.
//
// mode_sel 00 selects one 64-bit lane with the adder carry chain whole;
// 01 selects two 32-bit lanes and breaks the carry at accumulator bit 68;
// 10 selects four 16-bit lanes and breaks it at bits 34, 68 and 102.
// The mode codes and lane boundaries follow the source design; the decoded
// form (lane count, carry-break vector) and mapping the unused code 11 to
// full precision are this design's choices.
//
// Interface: mode_sel (2 bits) -> cfg (prec_cfg_t). Combinational.
module precision_ctrl
  import rmac_pkg::*;
(
  input  logic [1:0] mode_sel,
  output prec_cfg_t  cfg
);

  always_comb begin
    unique case (mode_sel)
      2'b01: begin
        cfg.mode        = MODE_DUAL;
        cfg.lanes       = 3'd2;
        cfg.carry_break = 3'b010;
      end
      2'b10: begin
        cfg.mode        = MODE_QUAD;
        cfg.lanes       = 3'd4;
        cfg.carry_break = 3'b111;
      end
      default: begin
        cfg.mode        = MODE_FULL;
        cfg.lanes       = 3'd1;
        cfg.carry_break = 3'b000;
      end
    endcase
  end

endmodule
