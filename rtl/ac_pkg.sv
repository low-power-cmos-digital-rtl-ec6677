// ac_pkg: types and constants shared by the 2-bit autocorrelator spectrometer.
//
// A digitized sample is a {sign, magnitude} pair. The sign bit is 1 for a
// negative input voltage, the magnitude bit is 1 when the input lies outside
// the +/-Vth window. Weights (n = 3): 11 -> -3, 10 -> -1, 00 -> +1, 01 -> +3.
// A lag product is the biased value 0..6 of the multiplication table, so it
// fits in 3 bits. The readout bus is 16 bits wide; in byte mode only its low
// 8 bits carry data.
package ac_pkg;

  typedef struct packed {
    logic sign;  // 1 = negative input voltage
    logic mag;   // 1 = outside the +/-Vth window
  } sample_t;

  localparam int unsigned PROD_W = 3;   // product range 0..6
  typedef logic [PROD_W-1:0] prod_t;

  localparam int unsigned BUS_W  = 16;  // readout bus, word mode
  localparam int unsigned BYTE_W = 8;   // readout bus, byte mode

  localparam sample_t SAMPLE_ZERO = '{sign: 1'b0, mag: 1'b0};

endpackage
