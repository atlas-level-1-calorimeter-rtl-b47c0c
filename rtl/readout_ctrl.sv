// readout_ctrl: read-request latency correction and DAQ slice sequencing.
//
// A Level-1 accept is delayed by the READ_REQUEST_DELAY value (0..63 ticks)
// and sent out as read_request, which starts DAQ readout in the Input FPGAs
// and the Sum processor. read_request follows l1a by delay+1 clocks. Each
// read request then produces `slices` consecutive slice strobes (the
// ROC_SLICE value, at most 5; larger values count as 5), with slice_idx
// counting 0,1,... The first strobe comes one clock after read_request.
// Requests that arrive while a sequence is running are queued (up to 7)
// and served back to back.
//
// The delay range and the slice limit follow the programming model; the
// queueing and the exact latencies are choices of this design.
module readout_ctrl #(
  parameter int unsigned MAX_DELAY  = 63,
  parameter int unsigned MAX_SLICES = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       l1a,
  input  logic [5:0] delay,
  input  logic [2:0] slices,
  output logic       read_request,
  output logic       slice_strobe,
  output logic [2:0] slice_idx
);
  logic [MAX_DELAY:0] pipe;     // pipe[i] = l1a delayed by i+1 clocks
  logic [2:0]         nslices, left, pend;
  logic               busy;

  assign nslices = (slices > 3'(MAX_SLICES)) ? 3'(MAX_SLICES) : slices;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipe <= '0;
    else if (clr) pipe <= '0;
    else pipe <= {pipe[MAX_DELAY-1:0], l1a};
  end
  assign read_request = pipe[delay];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; left <= '0; pend <= '0; slice_idx <= '0;
    end else if (clr) begin
      busy <= 1'b0; left <= '0; pend <= '0; slice_idx <= '0;
    end else if (busy) begin
      slice_idx <= slice_idx + 1'b1;
      left      <= left - 1'b1;
      if (left == 3'd1) busy <= 1'b0;
      if (read_request && pend != 3'd7) pend <= pend + 1'b1;
    end else if ((read_request || pend != '0) && nslices != '0) begin
      busy      <= 1'b1;
      left      <= nslices;
      slice_idx <= '0;
      if (!read_request) pend <= pend - 1'b1;
    end
  end
  assign slice_strobe = busy;
endmodule
