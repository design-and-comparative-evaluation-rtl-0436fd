// tb_sha3_hmac: self-checking test of sha3_hmac.
// Keys, messages and digests come from a software HMAC-SHA3-256; also checks the latency of
// 106 cycles from `start` to `done`.
module tb_sha3_hmac;
  import crypto_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam logic [127:0] KEYS [6] = '{
    128'h3460be31201e69fedaa0eee8b9997f5c,
    128'hb10becb5563bfc1e6f93427ecbc8fe29,
    128'hccc935f6cd1f61226ae15338ae1a3400,
    128'h2e85bb55b672a872637acd7466fcb60e,
    128'hcd2b5157410e4dee4af2b34f430a0734,
    128'h1d7f618d1532e70e20e2a6668de7f47e
  };
  localparam logic [127:0] MSG [6] = '{
    128'hd91e3f721fcb1971174494d6493c9d5c,
    128'h27a0aeb3fee9232f8af2211f9ee491c5,
    128'h7706f85d8690024ad6bda3401be9c8cb,
    128'hf5f79f2b4934af87f5520b69b94b0d98,
    128'h68f700f5b02b3dc666f45bdeaa2ccaed,
    128'hd7424d09e15d024c5848f23d1fa6f736
  };
  localparam logic [255:0] DIG [6] = '{
    256'hae9c70bc479e05b7dd2c13bdbb31cb9c341d93289bf9f3db8e3be24bccb15ca4,
    256'h04f2d2c381cd0c734703224b4ed397669850c65779a8f369cc1802ccc3e28504,
    256'hdbc91e09ea82743e6f8603e9b80f02edddf41c16a293d942ce56637f89b80879,
    256'h264461900e1a4ceaf160462ebc57c4d7772649e675e1271d7acc73fe5da8565a,
    256'h1c1a8eae0d87824e26d5f9d9c60541b682e31b2fd6cb6e908255c1d93bf86a07,
    256'hf07f8fac0989befb64b380c1ab118f33bc2a6696956e691cded22c780e5823ec
  };

  logic start = 1'b0, busy, done;
  blk128_t key = '0, msg = '0;
  dig256_t digest;
  int cyc;

  sha3_hmac dut (.clk, .rst, .start, .key, .msg, .busy, .done, .digest);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < $size(KEYS); i++) begin
      key <= KEYS[i]; msg <= MSG[i]; start <= 1'b1;
      @(posedge clk);
      start <= 1'b0; key <= '0; msg <= '0;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      checks++;
      if (digest !== DIG[i]) begin failures++; $display("vector %0d: got %h want %h", i, digest, DIG[i]); end
      checks++;
      if (cyc != 106) begin failures++; $display("vector %0d: latency %0d", i, cyc); end
      checks++;
      if (busy) begin failures++; $display("vector %0d: busy after done", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
