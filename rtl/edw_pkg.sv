// edw_pkg: constants shared by the EDWARD readout blocks.
//
// Default sizes of the 8 x 8 channel implementation example: 64 channels,
// a 6-bit channel address and an 8-bit group address on the shared bus.
// The number of phaser flip-flops (4) and the pull pattern that marks an
// empty bus are this design's own choices.
package edw_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N_CH_DEF = 64;   // 8 x 8 channels
  localparam int unsigned CW_DEF   = 6;    // channel address width
  localparam int unsigned GW_DEF   = 8;    // group address width
  localparam int unsigned NPH_DEF  = 4;    // phaser flip-flops per channel

  // Pull pattern of the shared bus: group field pulled up, channel field
  // pulled down. The group address all-ones is reserved for "empty".
  localparam logic [GW_DEF-1:0] GRP_PULL_DEF = '1;
  localparam logic [CW_DEF-1:0] CH_PULL_DEF  = '0;
endpackage
