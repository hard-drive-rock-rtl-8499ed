// sam_spi_model: behavioural model of the microcontroller's side of the SPI
// link, for testbenches. send_frame raises cs, waits GAP_NS, shifts out the
// low nbits of data MSB first (sdi changes while sck is low, the receiver
// samples on the rising edge), waits GAP_NS and lowers cs. A whole frame for
// all tracks is 24 bits per track: tune word high byte, low byte, volume.
module sam_spi_model #(
  parameter int unsigned SCK_HALF_NS = 2049,  // 244 kHz sck
  parameter int unsigned GAP_NS      = 1000,
  parameter int unsigned MAX_BITS    = 97
) (
  output logic cs,
  output logic sck,
  output logic sdi
);

  task automatic send_frame(input logic [MAX_BITS-1:0] data, input int nbits);
    cs = 1'b1;
    #(GAP_NS);
    for (int b = nbits - 1; b >= 0; b--) begin
      sdi = data[b];
      #(SCK_HALF_NS);
      sck = 1'b1;
      #(SCK_HALF_NS);
      sck = 1'b0;
    end
    #(GAP_NS);
    cs = 1'b0;
    #(GAP_NS);
  endtask

  // Drive the idle state; cs starts high for one time unit so that the
  // receiver's asynchronous cs-low clear sees an edge in two-state simulation.
  initial begin
    cs = 1'b1; sck = 1'b0; sdi = 1'b0;
    #1 cs = 1'b0;
  end

endmodule
