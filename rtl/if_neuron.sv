// if_neuron: behavioural model of the chip's integrate & fire neuron.
//
// Behavioural model of an analog part (not synthesizable logic; it uses
// delays). The neuron is an op-amp integrator with a C_FB = 15 pF feedback
// capacitor followed by a comparator. The op-amp holds its inverting input
// (pin in) at the resting potential vfb, so an input current iin (positive
// into the pin) moves the output by -iin/C_FB per second:
//     integration (vph = 0):  dVop/dt = -iin / C_FB
// A negative (excitatory) current therefore raises vop from vfb towards the
// threshold vth; vout goes high once vop exceeds vth. Driving vph high
// selects the spiking phase: a transmission gate shorts the capacitor, so
// vop follows vfb (onto which the external spike generator places its
// spike) and the neuron cannot fire again until vph returns low. The time
// to fire from vfb is t = C_FB (vth - vfb) / |iin|, e.g. 25.5 ms for 1 nA,
// vfb = 1 V, vth = 2.7 V. The circuit and its equations are the chip's;
// the time step DT_NS of this model is its own.
module if_neuron #(
  parameter real         C_FB  = 15.0e-12,
  parameter int unsigned DT_NS = 1000
) (
  input  real  iin,
  input  real  vfb,
  input  real  vth,
  input  logic vph,
  output real  vop,
  output logic vout
);

  localparam real DT = real'(DT_NS) * 1.0e-9;

  initial vop = 0.0;

  always begin
    #(DT_NS * 1ns);
    if (vph) vop = vfb;
    else     vop = vop - iin * DT / C_FB;
  end

  assign vout = (vop > vth);

endmodule
