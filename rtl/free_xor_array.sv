// free_xor_array: the overlay's free-XOR gates.
//
// With free-XOR garbling the two labels of every wire differ by one global
// offset, so the zero-label of an XOR output is simply the XOR of the input
// zero-labels and no encryption or table is needed. LANES gates (8, as in the
// overlay) work in parallel. `start` samples the inputs of the lanes whose
// `lane_en` bit is set; one cycle later `done` pulses with `c` holding a ^ b for
// those lanes (other lanes keep their previous output). The one-cycle register
// stage is this design's choice.
module free_xor_array
  import gc_pkg::*;
#(
  parameter int LANES = N_XOR
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LANES-1:0] lane_en,
  input  label_t           a [LANES],
  input  label_t           b [LANES],
  output logic             done,
  output label_t           c [LANES]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int i = 0; i < LANES; i++) c[i] <= '0;
    end else begin
      done <= start;
      if (start)
        for (int i = 0; i < LANES; i++)
          if (lane_en[i]) c[i] <= a[i] ^ b[i];
    end
  end

endmodule
