// fmcam_pkg: types shared by the modules of the multi-ported content
// addressable memory (FMCAM) and the parallel table-lookup coder built on it.
//
// search_mode_e selects how a port module ends a search:
//   MODE_MULTIPLE - visit every word of the category and report each match
//                   (the behaviour of the original FMCAM);
//   MODE_SINGLE   - stop at the first match, for one-to-one tables such as a
//                   Huffman code table.
// port_state_e is the state of one port module.
package fmcam_pkg;

  typedef enum logic {
    MODE_MULTIPLE = 1'b0,
    MODE_SINGLE   = 1'b1
  } search_mode_e;

  typedef enum logic {
    PORT_IDLE   = 1'b0,
    PORT_SEARCH = 1'b1
  } port_state_e;

endpackage
