// config_mem: the per-channel threshold memory and pedestal (offset) memory.
//
// Two separate arrays of NCH words x PW bits, one holding the operating
// threshold TH(i) = PED(i) + N*SIG(i) and one the pedestal PED(i) of each
// channel, as the chip description gives them. Both are written together,
// one channel per write, from the configuration-write sequence of the back-end.
// The front-end reads both by the channel address of the sample being
// processed; the back-end reads both for configuration read-back.
//
// Timing: synchronous write on the rising clock edge when we is high; both read
// ports are combinational (asynchronous read), so the front-end gets the
// channel's values in the same cycle as its amplitude. No reset: the memories
// must be written before the sparse scan is enabled, as the chip requires.
module config_mem #(
  parameter int unsigned NCH = 64,
  parameter int unsigned PW  = 8,
  localparam int unsigned CHW = $clog2(NCH)
) (
  input  logic           clk,
  // write port (configuration write)
  input  logic           we,
  input  logic [CHW-1:0] waddr,
  input  logic [PW-1:0]  wth,
  input  logic [PW-1:0]  wped,
  // front-end read port
  input  logic [CHW-1:0] fe_addr,
  output logic [PW-1:0]  fe_th,
  output logic [PW-1:0]  fe_ped,
  // back-end read port (configuration read)
  input  logic [CHW-1:0] be_addr,
  output logic [PW-1:0]  be_th,
  output logic [PW-1:0]  be_ped
);

  logic [PW-1:0] th_mem  [NCH];
  logic [PW-1:0] ped_mem [NCH];

  always_ff @(posedge clk) begin
    if (we) begin
      th_mem[waddr]  <= wth;
      ped_mem[waddr] <= wped;
    end
  end

  assign fe_th  = th_mem[fe_addr];
  assign fe_ped = ped_mem[fe_addr];
  assign be_th  = th_mem[be_addr];
  assign be_ped = ped_mem[be_addr];

endmodule
