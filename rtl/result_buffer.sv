// result_buffer: buffer memory of the self-checking control unit.
//
// Holds the most recent AES and HMAC results of the two regular modules of each kind (four
// 256-bit entries, entry 2*kind+side, side 0 = left). When the DMR pair disagrees, the spare
// recomputes the same input and its result is compared with these stored results to find
// which regular module was wrong. The document states what the buffer stores; its
// organisation (a small register array written a kind at a time, all entries readable at
// once) is this design's own. Writes take effect at the clock edge; reads are combinational.
module result_buffer
  import red_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [NKIND-1:0] we,          // write both sides of kind t
  input  res_t             wleft  [NKIND],
  input  res_t             wright [NKIND],
  output res_t             rleft  [NKIND],
  output res_t             rright [NKIND]
);
  res_t mem [2*NKIND];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2*NKIND; i++) mem[i] <= '0;
    end else begin
      for (int t = 0; t < NKIND; t++)
        if (we[t]) begin
          mem[2*t]   <= wleft[t];
          mem[2*t+1] <= wright[t];
        end
    end
  end

  always_comb
    for (int t = 0; t < NKIND; t++) begin
      rleft[t]  = mem[2*t];
      rright[t] = mem[2*t+1];
    end

endmodule
