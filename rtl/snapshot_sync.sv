// snapshot_sync: hands a wide, fast-changing value (counters, BCD time)
// from one clock domain to another as consistent snapshots.
//
// Copying a 64-bit counter bit by bit through synchronizers would tear it:
// bits sampled across an increment mix the old and the new value. Instead
// the destination keeps a request toggle. The source sees the toggle through
// two flip-flops, copies data_in into a hold register and returns the toggle
// as acknowledge. When the acknowledge arrives, again through two
// flip-flops, the hold register has been still for at least two
// destination clocks; the destination copies it to q and toggles the
// request again. So q is always one whole source-clock sample of data_in,
// refreshed every four to six destination clocks, and lags it by at most
// about that long. A source held in reset answers with its reset value
// (all zeros) and picks up the handshake again when released.
// The handshake is this design's own; the tester's description reads the
// counters from the slow serial-port domain without saying how.
module snapshot_sync #(
  parameter int unsigned W = 64
) (
  input  logic         clk_src,
  input  logic         rst_src_n,
  input  logic [W-1:0] data_in,
  input  logic         clk_dst,
  input  logic         rst_dst_n,
  output logic [W-1:0] q
);
  logic         req, ack;
  logic         req_s, ack_d;
  logic [W-1:0] hold;

  sync2 #(.W(1)) u_req_sync (.clk(clk_src), .rst_n(rst_src_n), .d(req), .q(req_s));
  sync2 #(.W(1)) u_ack_sync (.clk(clk_dst), .rst_n(rst_dst_n), .d(ack), .q(ack_d));

  // source side: capture on each new request
  always_ff @(posedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n) begin
      hold <= '0;
      ack  <= 1'b0;
    end else if (req_s != ack) begin
      hold <= data_in;
      ack  <= req_s;
    end
  end

  // destination side: take the hold register once acknowledged, ask again
  always_ff @(posedge clk_dst or negedge rst_dst_n) begin
    if (!rst_dst_n) begin
      q   <= '0;
      req <= 1'b0;
    end else if (ack_d == req) begin
      q   <= hold;
      req <= ~req;
    end
  end
endmodule
