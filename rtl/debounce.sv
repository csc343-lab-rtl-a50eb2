// debounce: cleans up a mechanical push-button contact.
//
// The raw contact is first passed through two flip-flops to bring it into the
// clk domain. The filtered level btn_clean only follows the synchronised input
// once that input has held its new value for STABLE_CYCLES consecutive clocks
// (DEBOUNCE_US microseconds at CLK_HZ); any bounce back restarts the count.
// btn_clean is the clean "clock" of the original scheme; press is a one-clock
// pulse on each accepted 0->1 change, which the rest of the design uses as a
// clock enable instead of clocking flip-flops from btn_clean.
//
// Latency: a press that stays closed is seen on btn_clean / press
// 2 + STABLE_CYCLES clocks after the contact closes. Bounces shorter than
// STABLE_CYCLES clocks are ignored. rst_n is asynchronous, active low, and
// leaves the button released.
//
// The lab circuit only asks for a filter that turns the bouncing contact into a
// clean clock; the counting method, the 10 ms window, the 48 MHz clock and the
// extra press pulse are this design's choices.
module debounce #(
  parameter int unsigned CLK_HZ      = 48_000_000,
  parameter int unsigned DEBOUNCE_US = 10_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic btn_raw,    // contact, 1 = pressed
  output logic btn_clean,  // filtered level
  output logic press       // one-clock pulse per accepted press
);
  localparam longint unsigned CyclesRaw =
      (longint'(CLK_HZ) * longint'(DEBOUNCE_US)) / 64'd1_000_000;
  localparam int unsigned STABLE_CYCLES = (CyclesRaw < 1) ? 1 : int'(CyclesRaw);
  localparam int unsigned CNT_W = $clog2(STABLE_CYCLES + 1);

  logic             sync1, sync2;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1     <= 1'b0;
      sync2     <= 1'b0;
      cnt       <= '0;
      btn_clean <= 1'b0;
      press     <= 1'b0;
    end else begin
      sync1 <= btn_raw;
      sync2 <= sync1;
      press <= 1'b0;
      if (sync2 == btn_clean) begin
        cnt <= '0;
      end else if (cnt == CNT_W'(STABLE_CYCLES - 1)) begin
        cnt       <= '0;
        btn_clean <= sync2;
        press     <= sync2;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
