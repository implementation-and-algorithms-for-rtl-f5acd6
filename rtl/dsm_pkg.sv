// dsm_pkg: types and constants shared by the boards of the TOF / MTD / PP2PP
// branch of the trigger DSM tree.
//
// Every Data Storage and Manipulation (DSM) board has 8 input channels of 16
// bits each and is clocked by the FPGA clock, four times the RHIC bunch
// crossing clock. An algorithm is described as a sequence of numbered steps;
// in this RTL each step is one register stage on the FPGA clock, so an
// algorithm of N steps has a latency of N clocks and accepts new data every
// clock. The bit layouts below are the ones the boards use on their cables.
package dsm_pkg;

  localparam int unsigned NUM_CH = 8;   // input channels per DSM board
  localparam int unsigned CH_W   = 16;  // bits per channel

  typedef logic [CH_W-1:0] dsm_chan_t;
  typedef dsm_chan_t [NUM_CH-1:0] dsm_in_t;

  // TOF layer 0 (TF001..TF006)
  localparam int unsigned TOF_TRAYS  = 20;  // multiplicity values per board
  localparam int unsigned TRAY_W     = 5;   // bits per tray multiplicity
  localparam int unsigned L0_MULT_W  = 10;  // layer-0 sum width (20*31 = 620)
  localparam int unsigned L0_LATENCY = 8;

  // TOF layer 1 (TF101)
  localparam int unsigned TOF_SECTORS = 6;   // layer-0 boards feeding TF101
  localparam int unsigned L1_MULT_W   = 13;  // total multiplicity width
  localparam int unsigned L1_LATENCY  = 8;

  // MTD layer 1 (MT101)
  localparam int unsigned TAC_W       = 12;  // good-TAC value width
  localparam int unsigned TACX_W      = 13;  // TAC difference / sum width
  localparam int unsigned MT_LATENCY  = 4;

  // TOF layer 2 (TF201)
  localparam int unsigned L2_LATENCY  = 4;

  // Bit positions of the 16 PP2PP good-hit bits from the PP001 QT board
  typedef enum int unsigned {
    RPEVU1 = 0,  RPEVU2 = 1,  RPEVD1 = 2,  RPEVD2 = 3,
    RPWVU1 = 4,  RPWVU2 = 5,  RPWVD1 = 6,  RPWVD2 = 7,
    RPEHO1 = 8,  RPEHO2 = 9,  RPEHI1 = 10, RPEHI2 = 11,
    RPWHO1 = 12, RPWHO2 = 13, RPWHI1 = 14, RPWHI2 = 15
  } pp_hit_bit_e;

  // The ten PP2PP trigger components made by TF201; also scaler bits 0..9
  typedef struct packed {
    logic whf;  // bit 9
    logic wvf;  // bit 8
    logic ehf;  // bit 7
    logic evf;  // bit 6
    logic wor_; // bit 5
    logic eor_; // bit 4
    logic ed;   // bit 3
    logic ec;   // bit 2
    logic eb;   // bit 1
    logic ea;   // bit 0
  } pp_comp_t;

endpackage
