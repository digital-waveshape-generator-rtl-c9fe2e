// dwg_pkg: types shared by the waveshape generator designs.
//
// host_wr_t is the byte-wide write bus a microprocessor uses to load
// divisors, wave shapes, phase addends and microcode. The designs are
// written by an 8-bit processor in the original work; the 16-bit address
// and the register maps in each design are this implementation's choice.
//
// microword_t is the 16-bit control word of the multi-channel DDS
// microsequencer: two 8-bit words, one from each sequencer RAM. The low
// four bits are the next microcode address, as in the original sequencer;
// the meaning of the other twelve bits is this implementation's choice.
package dwg_pkg;

  typedef struct packed {
    logic        we;
    logic [15:0] addr;
    logic [7:0]  data;
  } host_wr_t;

  // Sequencer RAM 1 byte (bits 15:8) | sequencer RAM 0 byte (bits 7:0)
  typedef struct packed {
    logic       spare;   // unused control output
    logic       we_en;   // write latch 3 back to the phase RAM in this step
    logic       l6_en;   // load latch 6 (DAC sample) at the end of this step
    logic       mux_acc; // 2:1 mux: 1 = add latch 5, 0 = add 0 (new sum)
    logic [3:0] wr_ch;   // channel held in latch 3 (write-back address, LUT bank)
    logic [3:0] rd_ch;   // channel read from addend / phase RAM in this step
    logic [3:0] next;    // next microcode address (fed back, address bits 0-3)
  } microword_t;

  // Split of the 1024-entry lookup table between channels.
  typedef enum logic [1:0] {
    LUT_4CH  = 2'd0,  // 4 channels x 256 samples
    LUT_8CH  = 2'd1,  // 8 channels x 128 samples
    LUT_16CH = 2'd2   // 16 channels x 64 samples
  } lut_mode_e;

endpackage
