// sparse_scan: the zero-suppression datapath of one sample.
//
// A digital comparator and a subtractor. With SubCmp high the sample is kept
// only if its amplitude is strictly larger than the channel threshold, and the
// value kept is the amplitude minus the channel pedestal. With SubCmp low both
// are bypassed: every sample is kept with its raw amplitude, which is how
// pedestals and noise are measured. Thresholds and pedestals are PW-bit and are
// zero-extended to the AW-bit amplitude range.
//
// The subtraction saturates at zero when the pedestal exceeds the amplitude
// (possible only with a threshold set below the pedestal); that clamp is this
// design's own choice. Purely combinational.
module sparse_scan #(
  parameter int unsigned AW = 12,
  parameter int unsigned PW = 8
) (
  input  logic          subcmp,   // 1: subtract and compare, 0: bypass
  input  logic [AW-1:0] ampl,
  input  logic [PW-1:0] th,
  input  logic [PW-1:0] ped,
  output logic          keep,     // sample goes into the data FIFO
  output logic [AW-1:0] value     // amplitude to store
);

  logic [AW-1:0] th_x, ped_x;

  always_comb begin
    th_x  = AW'(th);
    ped_x = AW'(ped);
    if (subcmp) begin
      keep  = ampl > th_x;
      value = (ampl >= ped_x) ? ampl - ped_x : '0;
    end else begin
      keep  = 1'b1;
      value = ampl;
    end
  end

endmodule
