// fh_pkg: types and constants shared by the Ethernet fronthaul testbed.
//
// A CPRI basic frame (BF) is 16 words: word 0 is the control word (CW) and
// words 1..15 carry IQ data. With profile 1 a word is 8 bits, so a BF is 128
// bits. PTP timestamps follow IEEE 1588: 48-bit seconds and 32-bit
// nanoseconds (always below 10^9). The EtherType of fronthaul frames, the
// CPRI control-word contents and the PTP addresses are choices of this design;
// the PTP message layout and message codes are those of IEEE 1588-2008.
package fh_pkg;

  localparam int unsigned BF_WORDS   = 16;          // 1 CW + 15 IQ words
  localparam int unsigned NS_PER_SEC = 1_000_000_000;

  // EtherTypes
  localparam logic [15:0] ETHERTYPE_FH  = 16'h88B5;  // IEEE local experimental
  localparam logic [15:0] ETHERTYPE_PTP = 16'h88F7;  // IEEE 1588 over Ethernet

  // Default station addresses (locally administered) and the PTP multicast
  localparam logic [47:0] MAC_BBU       = 48'h02_00_00_00_0B_B0;
  localparam logic [47:0] MAC_RRU       = 48'h02_00_00_00_0A_A0;
  localparam logic [47:0] MAC_PTP_MCAST = 48'h01_1B_19_00_00_00;

  typedef struct packed {
    logic [47:0] sec;
    logic [31:0] ns;
  } ptp_ts_t;

  typedef enum logic [3:0] {
    MSG_SYNC       = 4'h0,
    MSG_DELAY_REQ  = 4'h1,
    MSG_FOLLOW_UP  = 4'h8,
    MSG_DELAY_RESP = 4'h9
  } ptp_msg_t;

  // sourcePortIdentity: 8-byte clockIdentity + 2-byte portNumber
  typedef logic [79:0] port_id_t;

  // PTP message lengths (bytes after the Ethernet header)
  localparam int unsigned PTP_HDR_LEN  = 34;
  localparam int unsigned PTP_LEN_BASE = 44;   // SYNC, DELAY_REQ, FOLLOW_UP
  localparam int unsigned PTP_LEN_RESP = 54;   // DELAY_RESP
  localparam int unsigned ETH_HDR_LEN  = 14;

  // Event counters of one endpoint (BBU or RRU)
  typedef struct packed {
    logic [31:0] fh_frames_sent;     // fronthaul frames handed to the MAC
    logic [31:0] fh_frames_rcvd;     // complete fronthaul frames received
    logic [31:0] bad_frames;         // truncated frames
    logic [31:0] ptp_sent;           // PTP messages sent
    logic [31:0] ptp_rcvd;           // PTP messages received and decoded
    logic [31:0] ptp_waits;          // PTP frames held behind an IQ frame
    logic [31:0] resp_mismatch;      // DELAY_RESP rejected (port id / sequence)
    logic [31:0] cw_errors;          // breaks in the basic-frame sequence
    logic [31:0] rxq_overflows;      // basic frames dropped, receive queue full
    logic [31:0] txq_stalls;         // cycles the IQ source was held off
  } node_stats_t;

  // Servo state of the slave
  typedef struct packed {
    logic signed [63:0] delay_est;   // one-way delay, ns
    logic signed [63:0] offset_est;  // last raw time offset, ns
    logic signed [31:0] freq_est;    // filtered frequency offset, 2^-32
    logic [31:0]        time_corrections;
    logic [31:0]        freq_corrections;
  } servo_status_t;

  // a - b in nanoseconds, as a signed 64-bit number. The seconds difference
  // is taken modulo 2^32, ample for the intervals the servo measures.
  function automatic logic signed [63:0] ts_diff(ptp_ts_t a, ptp_ts_t b);
    logic signed [31:0] ds;
    logic signed [63:0] dn;
    ds = signed'(a.sec[31:0] - b.sec[31:0]);
    dn = signed'({32'd0, a.ns}) - signed'({32'd0, b.ns});
    return 64'(ds) * 64'sd1_000_000_000 + dn;
  endfunction

endpackage
