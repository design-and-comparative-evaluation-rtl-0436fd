// config_engine: configuration engine of the reconfiguration subsystem.
//
// When the self-checking control unit requests the partial reconfiguration of module `id`,
// the engine streams that module's bitstream (REGION_WORDS 16-bit words at id*REGION_WORDS)
// from the configuration memory into the ICAP, one word per write cycle, holding a word while
// the ICAP reports busy, and pulses `done` when the last word has been accepted. The document
// names the engine and the ICAP interface only; the two-cycle fetch/write word loop is this
// design's own. ICAP strobes are active low, as on the Spartan-6 ICAP (CE and WRITE).
//
// Timing: `req` is accepted when `busy` is low; a region takes 2*REGION_WORDS cycles plus ICAP
// busy cycles; `done` is a one-cycle pulse. Synchronous active-high reset.
// `icap_din` is the configuration memory's registered read data passed on unchanged: the
// memory's output register already holds the word for the ICAP write cycle.
module config_engine #(
  parameter int unsigned NREGIONS     = 4,
  parameter int unsigned REGION_WORDS = 4096,
  localparam int unsigned DEPTH       = NREGIONS * REGION_WORDS,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        req,
  input  logic [$clog2(NREGIONS)-1:0] id,
  output logic                        busy,
  output logic                        done,
  // configuration memory read port
  output logic                        mem_re,
  output logic [AW-1:0]               mem_raddr,
  input  logic [15:0]                 mem_rdata,
  // ICAP
  output logic                        icap_ce_n,
  output logic                        icap_write_n,
  output logic [15:0]                 icap_din,
  input  logic                        icap_busy
);
  typedef enum logic [1:0] {E_IDLE, E_FETCH, E_WRITE} est_e;

  est_e        st_q;
  logic [AW-1:0] addr_q;
  logic [AW:0]   left_q;    // words still to send

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q   <= E_IDLE;
      addr_q <= '0;
      left_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        E_IDLE: if (req) begin
          addr_q <= AW'(id * REGION_WORDS);
          left_q <= (AW+1)'(REGION_WORDS);
          st_q   <= E_FETCH;
        end
        E_FETCH: st_q <= E_WRITE;
        E_WRITE: if (!icap_busy) begin
          addr_q <= addr_q + 1'b1;
          left_q <= left_q - 1'b1;
          if (left_q == 1) begin
            st_q <= E_IDLE;
            done <= 1'b1;
          end else begin
            st_q <= E_FETCH;
          end
        end
        default: st_q <= E_IDLE;
      endcase
    end
  end

  assign busy         = (st_q != E_IDLE);
  assign mem_re       = (st_q == E_FETCH);
  assign mem_raddr    = addr_q;
  assign icap_ce_n    = !(st_q == E_WRITE);
  assign icap_write_n = !(st_q == E_WRITE);
  assign icap_din     = mem_rdata;

endmodule
