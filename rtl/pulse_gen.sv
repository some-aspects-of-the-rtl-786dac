// pulse_gen: programmable clock pulse generator.
//
// Lets exactly n master clock pulses through after a start pulse, n being
// set on DIGITS BCD thumbwheel digits.  start sets the run flip-flop and
// clears a DIGITS-decade counter; while the flip-flop is set each master
// clock is passed on (en high) and counted, and when the count equals the
// switch setting the flip-flop is cleared and done pulses for one clock.
// In continuous mode every master clock is passed on.
//
// Interface: clk, rst_n, start (one-clock strobe), n_set (packed BCD,
// digit 0 in bits 3:0), cont, en (the gated clock, as a clock enable),
// busy, done, count (BCD pulses passed in this run).
//
// Timing: en is high for exactly n clocks, starting the clock after start;
// done is high in the clock after the last en.  A setting of 0 gives no
// pulses and an immediate done.
//
// From the document: start flip-flop, BCD counter, comparison with the
// thumbwheel switches, continuous mode.  This design's choices: clock
// enable in place of a gated clock, a start during a run restarts it, and
// the handling of a zero setting.
module pulse_gen #(
  parameter int unsigned DIGITS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [4*DIGITS-1:0] n_set,
  input  logic                cont,
  output logic                en,
  output logic                busy,
  output logic                done,
  output logic [4*DIGITS-1:0] count
);
  initial assert (DIGITS >= 1 && DIGITS <= 4) else $error("pulse_gen: 1 to 4 digits");

  logic                run_q, done_q;
  logic [4*DIGITS-1:0] cnt_q, cnt_next;

  assign cnt_next = (4*DIGITS)'(disco_pkg::bcd_step(16'(cnt_q), DIGITS, 1'b1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      done_q <= 1'b0;
      cnt_q  <= '0;
    end else if (start) begin
      cnt_q  <= '0;
      run_q  <= (n_set != '0);
      done_q <= (n_set == '0);
    end else if (run_q) begin
      cnt_q  <= cnt_next;
      if (cnt_next == n_set) begin
        run_q  <= 1'b0;
        done_q <= 1'b1;
      end else begin
        done_q <= 1'b0;
      end
    end else begin
      done_q <= 1'b0;
    end
  end

  assign en    = run_q | cont;
  assign busy  = run_q;
  assign done  = done_q;
  assign count = cnt_q;
endmodule
