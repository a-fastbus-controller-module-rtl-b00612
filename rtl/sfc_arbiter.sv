// sfc_arbiter: FASTBUS mastership logic of the controller.
//
// Software sets the request bit of the control register to ask for the
// segment and clears it to give the segment up (GK down). While requesting,
// the block asserts AR. When the ancillary logic grants an arbitration cycle
// (AG), it places its 6-bit arbitration level on the wired-OR AL lines,
// withdrawing every lower bit below a bus bit that is set where its own level
// is clear; after SETTLE clocks the level on the bus equals its own only if it
// is the highest competitor. The winner waits for the previous master to
// release GK, then asserts GK, drops AR and stops driving AL. bus_mine is the
// "bus mine" status bit; took_mastership pulses once when GK is taken.
//
// Host preemption: with host set, GK is asserted at once without arbitration.
// Arbitration inhibit: when the ai_jumper input is set, AI is asserted while
// this module holds GK, keeping further arbitration cycles off the segment.
// SCRAM: a scram pulse drops GK immediately (the request bit is cleared by
// the register block).
//
// Follows the document: request bit and bus-mine bit, host preemption with GK,
// the jumpered inhibit and the SCRAM release of GK. The AL priority scheme and
// the settle time are from the FASTBUS standard as this design understands it,
// and the meaning of the inhibit jumper is this design's choice. AL outputs are
// registered, so the wired-OR settles over a few clocks without a
// combinational loop through the bus.
module sfc_arbiter #(
  parameter int unsigned SETTLE = 8   // clocks allowed for AL to settle
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  input  logic       host,
  input  logic [5:0] level,
  input  logic       ai_jumper,
  input  logic       scram,
  input  logic       ag_i,
  input  logic [5:0] al_i,
  input  logic       gk_i,
  output logic       ar_o,
  output logic [5:0] al_o,
  output logic       gk_o,
  output logic       ai_o,
  output logic       bus_mine,
  output logic       took_mastership
);

  typedef enum logic [2:0] {A_IDLE, A_REQ, A_COMP, A_WON, A_LOST, A_MASTER} arb_e;
  arb_e st;

  localparam int CW = $clog2(SETTLE + 1);
  logic [CW-1:0] cnt;
  logic [5:0]    al_next;

  // Withdraw each bit that lies below a bus bit set where our level is clear.
  always_comb begin
    logic beaten;
    beaten = 1'b0;
    for (int i = 5; i >= 0; i--) begin
      al_next[i] = level[i] & ~beaten;
      if (al_i[i] && !level[i]) beaten = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st              <= A_IDLE;
      cnt             <= '0;
      al_o            <= '0;
      gk_o            <= 1'b0;
      took_mastership <= 1'b0;
    end else begin
      took_mastership <= 1'b0;
      case (st)
        A_IDLE:
          if (host && !scram) begin
            gk_o            <= 1'b1;
            took_mastership <= 1'b1;
            st              <= A_MASTER;
          end else if (req && !scram) st <= A_REQ;
        A_REQ:
          if (!req) st <= A_IDLE;
          else if (ag_i) begin
            al_o <= level;
            cnt  <= '0;
            st   <= A_COMP;
          end
        A_COMP: begin
          al_o <= al_next;
          cnt  <= cnt + 1'b1;
          if (!ag_i) begin
            al_o <= '0;
            st   <= A_REQ;
          end else if (cnt == CW'(SETTLE)) begin
            if (al_i == level) st <= A_WON;
            else begin
              al_o <= '0;
              st   <= A_LOST;
            end
          end
        end
        A_WON:
          if (!req) begin
            al_o <= '0;
            st   <= A_IDLE;
          end else if (!gk_i) begin
            gk_o            <= 1'b1;
            al_o            <= '0;
            took_mastership <= 1'b1;
            st              <= A_MASTER;
          end
        A_LOST:
          if (!ag_i) st <= (req ? A_REQ : A_IDLE);
        A_MASTER:
          if (scram || (!req && !host)) begin
            gk_o <= 1'b0;
            st   <= A_IDLE;
          end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign ar_o     = (st == A_REQ) || (st == A_COMP) || (st == A_WON) || (st == A_LOST);
  assign bus_mine = (st == A_MASTER);
  assign ai_o     = ai_jumper && bus_mine;

endmodule
