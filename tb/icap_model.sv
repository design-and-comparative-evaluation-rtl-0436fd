// icap_model: behavioural model of the FPGA's internal configuration access port, for
// simulation only. It accepts a 16-bit word on each cycle with CE and WRITE low (both active
// low), raises BUSY for two cycles after every BUSY_EVERY-th word to exercise the engine's
// hold, and counts the words written (a word offered while BUSY is high is not taken). A real ICAP applies the words to the configuration memory of the device; this model
// only counts and checksums them.
module icap_model #(
  parameter int unsigned BUSY_EVERY = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce_n,
  input  logic        write_n,
  input  logic [15:0] din,
  output logic        busy,
  output int unsigned words,
  output logic [15:0] xsum
);
  int unsigned n;
  logic [1:0]  hold;
  always_ff @(posedge clk) begin
    if (rst) begin
      words <= 0;
      xsum  <= '0;
      hold  <= '0;
      n     <= 0;
    end else begin
      if (hold != 0) hold <= hold - 1;
      if (!ce_n && !write_n && !busy) begin
        words <= words + 1;
        xsum  <= xsum ^ din;
        n     <= n + 1;
        if (BUSY_EVERY != 0 && (n % BUSY_EVERY) == BUSY_EVERY - 1) hold <= 2'd2;
      end
    end
  end
  assign busy = (hold != 0);
endmodule
