// pip_module: board logic around the image processing/recognition chip set.
//
// The eight custom chips themselves (filters, convolvers, contour tracer, feature
// extractor) lie outside this module; it holds what the board adds around them:
//   - an 8-bit input video register loaded on the rising edge of PHI1, feeding the
//     first chip (chip_di);
//   - an 8-bit output video register loaded on the rising edge of PHI2, taking the
//     last chip's result (chip_do) back to the crossbar;
//   - seven 74LS374 control latches: latch i loads the host data BDATA[7:0] on the
//     rising edge of WSEL[i] and holds the chips' low-rate mode settings (ctrl[i]);
//   - four 74LS244 read-back drivers: while RSEL_L[i] is low, the chips' low-rate
//     result rd[i] drives the host data bus (hdata, hdata_oe).
// The register counts and clock phases follow the document; which latch holds which
// setting depends on the chips and is not given. Latches have no reset, as 74LS374s.
// If several RSEL_L lines were low at once their data would be ORed (bus fight on
// the board); the vector decoder never does that.
module pip_module
  import imgboard_pkg::*;
(
  input  logic                    phi1,
  input  logic                    phi2,
  input  pixel_t                  video_in,
  output pixel_t                  video_out,
  output pixel_t                  chip_di,
  input  pixel_t                  chip_do,
  input  logic [N_WREG-1:0]       wsel,
  input  logic [7:0]              bdata,
  output logic [N_WREG-1:0][7:0]  ctrl,
  input  logic [N_RDRV-1:0]       rsel_l,
  input  logic [N_RDRV-1:0][7:0]  rd,
  output logic [7:0]              hdata,
  output logic                    hdata_oe
);

  always_ff @(posedge phi1) chip_di   <= video_in;
  always_ff @(posedge phi2) video_out <= chip_do;

  for (genvar i = 0; i < N_WREG; i++) begin : g_wreg
    logic [7:0] q;
    always_ff @(posedge wsel[i]) q <= bdata;
    assign ctrl[i] = q;
  end

  always_comb begin
    hdata    = '0;
    hdata_oe = 1'b0;
    for (int i = 0; i < N_RDRV; i++) begin
      if (!rsel_l[i]) begin
        hdata    = hdata | rd[i];
        hdata_oe = 1'b1;
      end
    end
  end

endmodule
