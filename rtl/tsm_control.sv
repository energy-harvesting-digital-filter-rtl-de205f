// tsm_control: control of the two-speed radix-4 multiplier.
//
// The datapath has two speeds. A Booth digit whose window P[2:0] is 000 or
// 111 adds nothing, so `skip` is raised and the product register only shifts,
// which takes one clock period T. Any other digit goes through the adder,
// whose delay is K'T: the controller waits KP cycles (a multicycle path) and
// then lets the product register take the adder's shifted result. One
// multiplication of N digits with O non-zero digits therefore takes
// (N - O) + O * KP busy cycles, between N and N * KP.
//
// The digit counter is log2(N) bits wide and `done` is raised in the cycle
// of the last step, when the product is taken from the shifter output rather
// than from the product register (no extra cycle). The KP-cycle wait of a
// non-skipped digit uses a one-hot phase register instead of a second counter
// and comparator. Both follow the two optimisations the source describes;
// the one-hot phase is this design's way of dropping the counter.
//
// Timing: `start` is sampled when idle; the next cycle is the first busy
// cycle. `load` is combinational (start while idle), `step` enables the
// product register, `done` pulses with the last step.
module tsm_control #(
  parameter int unsigned N  = 16,  // radix-4 digits per multiplication
  parameter int unsigned KP = 2    // clock cycles of a non-skipped addition
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] p_low,   // P[2:0]: the current Booth window
  output logic       load,
  output logic       skip,
  output logic       step,
  output logic       busy,
  output logic       done
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;
  logic [KP-1:0] phase;

  // Equation (1) of the design: skip when the window is 000 or 111
  assign skip = busy && ((p_low == 3'b000) || (p_low == 3'b111));
  assign step = busy && (skip || phase[KP-1]);
  assign done = step && (cnt == CW'(N - 1));
  assign load = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= '0;
      phase <= KP'(1);
    end else begin
      if (load) begin
        busy  <= 1'b1;
        cnt   <= '0;
        phase <= KP'(1);
      end else if (busy) begin
        if (step) begin
          cnt   <= cnt + 1'b1;
          phase <= KP'(1);
          if (done) busy <= 1'b0;
        end else begin
          phase <= phase << 1;
        end
      end
    end
  end

  // A step happens at most once per KP cycles of waiting
  a_phase_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(phase));

endmodule
