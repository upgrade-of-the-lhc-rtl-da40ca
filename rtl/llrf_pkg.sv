// llrf_pkg: types and constants shared by the Beam-Control transmitter and
// the WR2RF receiver of the RF-over-White-Rabbit distribution.
//
// Every frequency travels as a 48-bit frequency tuning word (FTW) of a
// harmonic-1 (revolution) NCO clocked at 125 MHz; every phase is the 48-bit
// value of such an accumulator (a full turn is 2**48). The RF frame payload is
// 50 bytes: one 25-byte record per beam, each holding the program FTW, the
// master FTW, one control byte and the program and master reference phases.
// Field widths, the 50-byte total and the three control flags follow the
// frame description; the order of the fields in the byte stream, big-endian
// byte order and the bit positions inside the control byte are this design's
// own choice.
package llrf_pkg;

  localparam int unsigned FTW_W    = 48;   // FTW and phase width
  localparam int unsigned N_BEAMS  = 2;    // one record per LHC ring
  localparam int unsigned PAYLOAD_BYTES = 50;

  typedef logic [FTW_W-1:0] ftw_t;
  typedef logic [FTW_W-1:0] phase_t;

  // Control byte: bit 0 NCO_reset, bit 1 NCO_resync, bit 2 DDS_resync.
  typedef struct packed {
    logic [4:0] reserved;
    logic       dds_resync;
    logic       nco_resync;
    logic       nco_reset;
  } ctrl_t;

  // One beam record, 25 bytes, first field first on the wire.
  typedef struct packed {
    ftw_t   ftw_prog;
    ftw_t   ftw_master;
    ctrl_t  ctrl;
    phase_t phase_prog;
    phase_t phase_master;
  } beam_rec_t;

  // Whole payload: beam 1 (index 0) first on the wire.
  typedef beam_rec_t [0:N_BEAMS-1] payload_t;

  localparam int unsigned PAYLOAD_BITS = $bits(payload_t);

  // Byte k (k = 0 first on the wire) of a payload, most significant first.
  function automatic logic [7:0] payload_byte(payload_t p, int unsigned k);
    logic [PAYLOAD_BITS-1:0] flat;
    flat = p;
    // element 0 of the ascending packed array holds the upper bits
    return flat[PAYLOAD_BITS-1-8*k -: 8];
  endfunction

endpackage
