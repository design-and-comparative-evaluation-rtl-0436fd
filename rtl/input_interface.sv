// input_interface: one of the two input interfaces between the crypto modules and the
// comparators.
//
// For each kind (AES, HMAC) it captures the result of its regular module and of the spare
// module when their `done` pulses, and presents to the comparators either the regular or the
// spare result, as the control unit selects while the spare stands in for a faulty module
// that is being reconfigured. `valid` of a kind is high once the selected module has
// delivered since the last `clr`. The document shows the interfaces by name only; capture
// registers and the selection rule are this design's own. Registered outputs, synchronous
// active-high reset; `clr` has priority over a capture in the same cycle.
module input_interface
  import red_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic [NKIND-1:0] reg_done,
  input  res_t             reg_res   [NKIND],
  input  logic [NKIND-1:0] spare_done,
  input  res_t             spare_res [NKIND],
  input  logic [NKIND-1:0] use_spare,
  output res_t             out_res   [NKIND],
  output logic [NKIND-1:0] out_valid
);
  res_t             reg_q [NKIND];
  res_t             spr_q [NKIND];
  logic [NKIND-1:0] reg_v, spr_v;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_v <= '0;
      spr_v <= '0;
      for (int t = 0; t < NKIND; t++) begin
        reg_q[t] <= '0;
        spr_q[t] <= '0;
      end
    end else begin
      for (int t = 0; t < NKIND; t++) begin
        if (clr) begin
          reg_v[t] <= 1'b0;
          spr_v[t] <= 1'b0;
        end else begin
          if (reg_done[t]) begin
            reg_q[t] <= reg_res[t];
            reg_v[t] <= 1'b1;
          end
          if (spare_done[t]) begin
            spr_q[t] <= spare_res[t];
            spr_v[t] <= 1'b1;
          end
        end
      end
    end
  end

  always_comb
    for (int t = 0; t < NKIND; t++) begin
      out_res[t]   = use_spare[t] ? spr_q[t] : reg_q[t];
      out_valid[t] = use_spare[t] ? spr_v[t] : reg_v[t];
    end

endmodule
