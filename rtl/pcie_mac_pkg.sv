// pcie_mac_pkg: symbol codes, state numbers and small encodings shared by the
// PCIe Gen1 x1 MAC (logical physical layer). Symbols are 8b/10b code points
// after decoding; a separate D/K flag (1 = data, 0 = control) travels with
// each byte. The LTSSM sub-state numbers 0x0..0xA follow the numbering used
// for the design's waveforms; the two Recovery numbers are this design's own.
package pcie_mac_pkg;

  // Control (K) symbols
  localparam logic [7:0] K_COM = 8'hBC;  // K28.5 comma, starts every ordered set
  localparam logic [7:0] K_STP = 8'hFB;  // K27.7 start of TLP
  localparam logic [7:0] K_SDP = 8'h5C;  // K28.2 start of DLLP
  localparam logic [7:0] K_END = 8'hFD;  // K29.7 end of packet
  localparam logic [7:0] K_EDB = 8'hFE;  // K30.7 end of nullified packet
  localparam logic [7:0] K_PAD = 8'hF7;  // K23.7 pad
  localparam logic [7:0] K_SKP = 8'h1C;  // K28.0 skip
  localparam logic [7:0] K_IDL = 8'h7C;  // K28.3 electrical idle set
  localparam logic [7:0] K_EIE = 8'hFC;  // K28.7 electrical idle exit

  // Training sequence identifiers (data symbols 6..15)
  localparam logic [7:0] TS1_ID = 8'h4A;
  localparam logic [7:0] TS2_ID = 8'h45;
  localparam logic [7:0] RATE_GEN1 = 8'h02;  // 2.5 GT/s supported

  // LTSSM sub-states
  typedef enum logic [4:0] {
    ST_DETECT_QUIET   = 5'h00,
    ST_DETECT_ACTIVE  = 5'h01,
    ST_POLLING_ACTIVE = 5'h02,
    ST_POLLING_CONFIG = 5'h03,
    ST_CFG_LW_START   = 5'h04,
    ST_CFG_LW_ACCEPT  = 5'h05,
    ST_CFG_LN_WAIT    = 5'h06,
    ST_CFG_LN_ACCEPT  = 5'h07,
    ST_CFG_COMPLETE   = 5'h08,
    ST_CFG_IDLE       = 5'h09,
    ST_L0             = 5'h0A,
    ST_RCV_LOCK       = 5'h0B,
    ST_RCV_CFG        = 5'h0C
  } ltssm_state_t;

  // OS_Creator set type
  typedef enum logic [1:0] {
    OS_OTHER = 2'b00,   // SKP / EIOS: COM plus three symbols
    OS_TS    = 2'b01,   // TS1 / TS2: 16 symbols
    OS_IDLE  = 2'b10    // logical idle (00h data)
  } os_type_t;

  // Rx filter symbol classes (controlsSignals)
  typedef enum logic [2:0] {
    FC_ERR = 3'b000,
    FC_STP = 3'b001,
    FC_SDP = 3'b010,
    FC_END = 3'b011,
    FC_EBD = 3'b100,
    FC_VLD = 3'b101,
    FC_DFT = 3'b111
  } filt_ctrl_t;

  // Rx filter state
  typedef enum logic [1:0] {
    FS_IDLE = 2'b00,    // between packets, nothing forwarded
    FS_OS   = 2'b01,    // after COM: symbols go to the LTSSM
    FS_PKT  = 2'b10     // after STP/SDP: symbols go to the buffers
  } filt_state_t;

  // Tx multiplexer select
  typedef enum logic [1:0] {
    MUX_TXBUF = 2'b00,
    MUX_SE    = 2'b01,
    MUX_IDLE  = 2'b10,
    MUX_OS    = 2'b11
  } mux_sel_t;

  // Start-end framing select
  typedef enum logic [1:0] {
    SE_STP = 2'b00,
    SE_SDP = 2'b01,
    SE_END = 2'b10,
    SE_EDB = 2'b11
  } se_sel_t;

  // Packet indicator written beside every Tx buffer word
  typedef enum logic [1:0] {
    PI_NONE = 2'b00,
    PI_TLP  = 2'b01,    // first word of a TLP
    PI_DLLP = 2'b10,    // first word of a DLLP
    PI_CONT = 2'b11     // later word of the same packet
  } pi_t;

  // A byte in an ordered-set word that is a control symbol
  function automatic logic os_byte_is_k(input logic [7:0] b);
    return (b == K_COM) || (b == K_SKP) || (b == K_IDL) || (b == K_EIE) || (b == K_PAD);
  endfunction

endpackage
