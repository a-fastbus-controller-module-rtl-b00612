// sfc_timeout: FASTBUS master timeout counter.
//
// While the master waits for an acknowledge (run = 1) the counter advances one
// step per clock; after LIMIT clocks of waiting it raises expired. A slave's
// WT holds the count, so a slave that asks for time is not timed out; this is
// what lets diagnostic software test WT generation with overlapped commands
// without the master giving up. clear restarts the count at zero and is used
// at the start of every handshake step.
//
// The document names the counter and says the master manages it; its length
// and the WT hold are this design's choices. Timing: expired rises LIMIT
// clocks after run rises (counting only clocks with wt = 0) and stays high
// until clear.
module sfc_timeout #(
  parameter int unsigned LIMIT = 1000   // clocks of waiting before timeout
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic run,
  input  logic wt,
  output logic expired
);

  localparam int W = $clog2(LIMIT + 1);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (clear) cnt <= '0;
    else if (run && !wt && !expired) cnt <= cnt + 1'b1;
  end

  assign expired = (cnt >= W'(LIMIT));

endmodule
