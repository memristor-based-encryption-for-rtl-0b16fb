// round_counter: RC/RK round selector counter and encryption sequencer.
//
// A 6-bit counter built from toggle flip-flops (bit i toggles when every
// lower bit is 1) holds the index of the round row that the shared 6-to-40
// decoder selects in all RC/RK crossbars. One round is read per clock:
// in the cycle where start is high the counter is 0 and round 1 is read
// (first=1, the slices take the plaintext); the following ROUNDS-1 cycles
// read rounds 2..ROUNDS from the fed-back state (busy=1). After the edge
// that stores the last round, the counter clears and done pulses for one
// cycle. start is ignored while busy. Latency from start to done: ROUNDS
// clock cycles (40 cycles, 4 us at 10 MHz, for GIFT-128).
//
// Counting with toggle flip-flops instead of a 40-stage shift register
// follows the document; the start/busy/done sequencing and the asynchronous
// active-low reset are this design's choices.
module round_counter #(
  parameter int unsigned ROUNDS = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic [5:0] cnt,
  output logic       active,  // a round is read this cycle
  output logic       first,   // this cycle reads round 1
  output logic       busy,    // rounds 2..ROUNDS in progress
  output logic       done     // pulse after the last round
);
  logic [5:0] tgl;
  logic       carry;
  logic       last;

  assign first  = start & ~busy;
  assign active = first | busy;
  assign last   = active && (cnt == 6'(ROUNDS - 1));

  // T inputs of the toggle flip-flops
  always_comb begin
    carry = active;
    for (int i = 0; i < 6; i++) begin
      tgl[i] = carry;
      carry  = carry & cnt[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (last) begin
        cnt  <= '0;
        busy <= 1'b0;
      end else begin
        cnt  <= cnt ^ tgl;
        busy <= active;
      end
    end
  end

  initial assert (ROUNDS >= 2 && ROUNDS <= 64) else $error("ROUNDS must be 2..64");
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) cnt < 6'(ROUNDS));
  a_idle_zero: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> cnt == 0);
endmodule
