// tb_aes128_enc: self-checking test of aes128_enc.
// Runs the FIPS-197 example vectors and random vectors made by an independent software AES,
// checks every result and that `done` comes exactly 11 cycles after `start`.
module tb_aes128_enc;
  import crypto_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam logic [127:0] KEYS [8] = '{
    128'h000102030405060708090a0b0c0d0e0f,
    128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'ha54dca182530bb1d6d132cded6237b2e,
    128'h7c2999fdafe593253cd654af4dfad714,
    128'h55e5cd8e46dc8ed4b7c2764d2a5a4d76,
    128'h4d33ba0d246ac04c81b1baf23e3bf9ee,
    128'h0e8ff18463b0e4b2ba29703474f064ac,
    128'h47de636c0e806c957ba684d6431fb5ea
  };
  localparam logic [127:0] DIN [8] = '{
    128'h00112233445566778899aabbccddeeff,
    128'h3243f6a8885a308d313198a2e0370734,
    128'hd91e3f721fcb1971174494d6493c9d5c,
    128'h27a0aeb3fee9232f8af2211f9ee491c5,
    128'h7706f85d8690024ad6bda3401be9c8cb,
    128'hf5f79f2b4934af87f5520b69b94b0d98,
    128'h68f700f5b02b3dc666f45bdeaa2ccaed,
    128'hd7424d09e15d024c5848f23d1fa6f736
  };
  localparam logic [127:0] DOUT [8] = '{
    128'h69c4e0d86a7b0430d8cdb78070b4c55a,
    128'h3925841d02dc09fbdc118597196a0b32,
    128'h6c8b37ec6d39a6b066960cab525ef485,
    128'he8569aeb4411bc1418109473f0b3420a,
    128'h84130c164d61dfe60ec037a53437361e,
    128'hd3127456d2e989f9b9424c425e4450bc,
    128'h7eac31ecf9e9e66ab5dc7831486e29a3,
    128'hb9b6625ff89ad63c4342e223917f2b8a
  };

  logic start = 1'b0, busy, done;
  blk128_t key = '0, din = '0, dout;
  int cyc;

  aes128_enc dut (.clk, .rst, .start, .key, .din, .busy, .done, .dout);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < $size(KEYS); i++) begin
      key <= KEYS[i]; din <= DIN[i]; start <= 1'b1;
      @(posedge clk);
      start <= 1'b0; key <= '0; din <= '0;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      checks++;
      if (dout !== DOUT[i]) begin failures++; $display("vector %0d: got %h want %h", i, dout, DOUT[i]); end
      checks++;
      if (cyc != 11) begin failures++; $display("vector %0d: latency %0d", i, cyc); end
      repeat (2) @(posedge clk);
      checks++;
      if (dout !== DOUT[i] || busy) begin failures++; $display("vector %0d: output not held", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
