// fine_delay: behavioural model of the fine latch delay, a tapped chain of
// buffers with a multiplexor, as built inside the tester's control FPGA.
//
// This is not synthesizable logic: each buffer is modelled by a continuous
// assignment with a transport-free (inertial) delay of STEP nanoseconds,
// and sel picks the output of buffer sel, so trig_out follows trig_in after
// (sel + 1) * STEP ns. The original gives steps of about 10 to 15 ns and
// lets the test program set the tap per vector; the tap count (8) and the
// 12 ns step are this model's choices, picked so that the longest delay
// (96 ns) stays under one 100 ns bus clock period, which the rest of the
// design relies on (level 3 is read no earlier than one bus clock after the
// coarse delay fires).
module fine_delay #(
  parameter int unsigned TAPS = 8,
  parameter realtime     STEP = 12.0   // ns per buffer
) (
  input  logic                    trig_in,
  input  logic [$clog2(TAPS)-1:0] sel,
  output logic                    trig_out
);
  logic [TAPS-1:0] tap;

  assign #(STEP) tap[0] = trig_in;
  for (genvar i = 1; i < TAPS; i++) begin : g_buf
    assign #(STEP) tap[i] = tap[i-1];
  end

  assign trig_out = tap[sel];
endmodule
