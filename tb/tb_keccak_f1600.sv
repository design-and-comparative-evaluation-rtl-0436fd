// tb_keccak_f1600: self-checking test of keccak_f1600.
// Applies the permutation to the all-zero state and then to its own result, and compares all
// 25 lanes with an independent software Keccak; checks the latency of 25 cycles.
module tb_keccak_f1600;
  import crypto_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam logic [63:0] Z1 [25] = '{
    64'hf1258f7940e1dde7,
    64'h84d5ccf933c0478a,
    64'hd598261ea65aa9ee,
    64'hbd1547306f80494d,
    64'h8b284e056253d057,
    64'hff97a42d7f8e6fd4,
    64'h90fee5a0a44647c4,
    64'h8c5bda0cd6192e76,
    64'had30a6f71b19059c,
    64'h30935ab7d08ffc64,
    64'heb5aa93f2317d635,
    64'ha9a6e6260d712103,
    64'h81a57c16dbcf555f,
    64'h43b831cd0347c826,
    64'h01f22f1a11a5569f,
    64'h05e5635a21d9ae61,
    64'h64befef28cc970f2,
    64'h613670957bc46611,
    64'hb87c5a554fd00ecb,
    64'h8c3ee88a1ccf32c8,
    64'h940c7922ae3a2614,
    64'h1841f924a2c509e4,
    64'h16f53526e70465c2,
    64'h75f644e97f30a13b,
    64'heaf1ff7b5ceca249
  };
  localparam logic [63:0] Z2 [25] = '{
    64'h2d5c954df96ecb3c,
    64'h6a332cd07057b56d,
    64'h093d8d1270d76b6c,
    64'h8a20d9b25569d094,
    64'h4f9c4f99e5e7f156,
    64'hf957b9a2da65fb38,
    64'h85773dae1275af0d,
    64'hfaf4f247c3d810f7,
    64'h1f1b9ee6f79a8759,
    64'he4fecc0fee98b425,
    64'h68ce61b6b9ce68a1,
    64'hdeea66c4ba8f974f,
    64'h33c43d836eafb1f5,
    64'he00654042719dbd9,
    64'h7cf8a9f009831265,
    64'hfd5449a6bf174743,
    64'h97ddad33d8994b40,
    64'h48ead5fc5d0be774,
    64'he3b8c8ee55b7b03c,
    64'h91a0226e649e42e9,
    64'h900e3129e7badd7b,
    64'h202a9ec5faa3cce8,
    64'h5b3402464e1c3db6,
    64'h609f4e62a44c1059,
    64'h20d06cd26a8fbf5c
  };

  logic start = 1'b0, busy, done;
  kstate_t sin = '0, sout;
  int cyc;

  keccak_f1600 dut (.clk, .rst, .start, .state_in(sin), .busy, .done, .state_out(sout));

  task automatic run(input kstate_t s, input int pass);
    sin <= s; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0; sin <= '0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc != 25) begin failures++; $display("latency %0d", cyc); end
    for (int i = 0; i < 25; i++) begin
      checks++;
      if (sout[i] !== (pass == 0 ? Z1[i] : Z2[i])) begin
        failures++; $display("pass %0d lane %0d: %h", pass, i, sout[i]);
      end
    end
  endtask

  initial begin
    kstate_t r;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run('0, 0);
    r = sout;
    run(r, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
