// vreg_model: behavioural model of the external voltage regulator, for
// simulation only. The supply code moves one 10 mV step toward v_target
// every SLEW clock cycles; done is high while the supply equals the target
// (registered, so it follows a target change one cycle late). The supply
// starts at RESET_CODE. ramp_cycles counts cycles spent ramping.
module vreg_model #(
  parameter int unsigned SLEW       = 2,
  parameter logic [7:0]  RESET_CODE = 8'd150
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] v_target,
  output logic [7:0] vdd,
  output logic       done
);
  int unsigned div;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vdd  <= RESET_CODE;
      done <= 1'b0;
      div  <= 0;
    end else begin
      done <= (vdd == v_target);
      if (vdd == v_target) div <= 0;
      else if (div + 1 >= SLEW) begin
        div <= 0;
        vdd <= (vdd < v_target) ? vdd + 8'd1 : vdd - 8'd1;
      end else div <= div + 1;
    end
  end
endmodule
