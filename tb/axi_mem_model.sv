// axi_mem_model: behavioural model of external memory behind an AXI4
// read port (read address and read data channels only), for testbenches.
//
// Holds DEPTH_WORDS 32-bit words in `mem`, which the testbench fills
// directly. Accepted bursts are queued in order; a burst's first beat is
// offered `latency` cycles after its address was accepted, then one beat
// per cycle. With `stalls` set, ARREADY and RVALID are dropped at random
// (about one cycle in four) to exercise back-pressure. A word index beyond
// the memory returns zero with an SLVERR response. ar_count and
// stall_count count accepted bursts and stalled cycles.
module axi_mem_model #(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned DEPTH_WORDS = 1024
) (
  input  logic              clk,
  input  logic              arvalid,
  output logic              arready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [2:0]        arsize,
  input  logic [1:0]        arburst,
  output logic              rvalid,
  input  logic              rready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  output logic              rlast
);

  typedef struct {
    longint unsigned word;
    int              beats;
    longint          due;
  } burst_t;

  logic [31:0] mem [DEPTH_WORDS];
  int          latency     = 6;
  bit          stalls      = 1'b0;
  int          ar_count    = 0;
  int          stall_count = 0;
  int          bad_burst   = 0;

  burst_t q[$];
  longint now  = 0;
  int     beat = 0;

  initial begin
    arready = 1'b0;
    rvalid  = 1'b0;
    rdata   = '0;
    rresp   = '0;
    rlast   = 1'b0;
  end

  always @(posedge clk) begin
    longint unsigned w;
    now++;
    if (arvalid && arready) begin
      if (arsize != 3'd2 || arburst != 2'b01) bad_burst++;
      q.push_back('{word: longint'(araddr) >> 2, beats: int'(arlen) + 1, due: now + latency});
      ar_count++;
    end
    if (rvalid && rready) begin
      beat++;
      if (beat == q[0].beats) begin
        void'(q.pop_front());
        beat = 0;
      end
    end
    if (stalls && ($urandom_range(3, 0) == 0)) begin
      arready <= 1'b0;
      stall_count++;
    end else begin
      arready <= 1'b1;
    end
    if (q.size() > 0 && q[0].due <= now && !(stalls && $urandom_range(3, 0) == 0)) begin
      w = q[0].word + longint'(beat);
      rvalid <= 1'b1;
      rdata  <= (w < DEPTH_WORDS) ? mem[w] : 32'd0;
      rresp  <= (w < DEPTH_WORDS) ? 2'b00 : 2'b10;
      rlast  <= (beat == q[0].beats - 1);
    end else begin
      rvalid <= 1'b0;
      rlast  <= 1'b0;
    end
  end

endmodule
