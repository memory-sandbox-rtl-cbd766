// Measurement unit of one direction (read or write) of a pattern generator.
//
// Replaces the logic analyser probes of a bench measurement with counters
// that software reads back:
//   cycles   from the first cycle an address is valid on the port to the
//            cycle of the last response, inclusive; throughput follows as
//            beats * bytes_per_beat * f_clk / cycles;
//   latency  from the first address valid to the first response (first read
//            data beat, or first write response);
//   beats    data beats transferred;
//   errors   responses other than OKAY.
// A start pulse clears the counters and makes the unit busy. It becomes done
// when the generator has issued every command and the engine has nothing
// outstanding (finished high), after at least one cycle of activity or at
// once for an empty run.
//
// Interface: single-cycle event inputs from an AXI engine; the results as a
// perf_t structure, held until the next start.
// Timing: the result is stable the cycle after done rises.
//
// Where the clock starts and stops, and the 64-bit widths, are choices of
// this design.
module perf_counter
  import ms_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  addr_valid,
  input  logic  resp_pulse,
  input  logic  beat_pulse,
  input  logic  err_pulse,
  input  logic  finished,
  output perf_t perf
);
  logic running;    // first address seen
  logic got_resp;   // first response seen

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf     <= '0;
      running  <= 1'b0;
      got_resp <= 1'b0;
    end else if (start) begin
      perf      <= '0;
      perf.busy <= 1'b1;
      running   <= 1'b0;
      got_resp  <= 1'b0;
    end else if (perf.busy) begin
      if (finished && !addr_valid) begin
        perf.busy <= 1'b0;
        perf.done <= 1'b1;
      end else begin
        if (addr_valid || running) begin
          running     <= 1'b1;
          perf.cycles <= perf.cycles + 1'b1;
        end
        if ((addr_valid || running) && !got_resp && !resp_pulse)
          perf.latency <= perf.latency + 1'b1;
        if (resp_pulse) got_resp <= 1'b1;
      end
      if (beat_pulse) perf.beats  <= perf.beats + 1'b1;
      if (err_pulse)  perf.errors <= perf.errors + 1'b1;
    end
  end
endmodule
