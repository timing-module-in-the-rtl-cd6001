// tim_pkg: types and constants shared by the timing (TIM) chip modules.
// Holds the BGO command codes and the decoded command bundle, the codes of
// the source-select fields of the COMMAND register, the two-line backplane
// encoding of L1A/RESET/EVCNT_RES, the readout data identifiers, the
// Channel Link word types and the VME register map (byte addresses, A17..A0).
// Codes and addresses follow the register description of the TIM chip; the
// struct layouts are this design's own.
package tim_pkg;

  // LHC orbit: bunch crossings 0..3563; ORBIT_LENGTH register holds 3564-2.
  localparam int unsigned         BX_PER_ORBIT         = 3564;
  localparam logic [15:0]         ORBIT_LENGTH_DEFAULT = 16'h0DEA;

  // BGO command codes (4 bits, strobed).
  typedef enum logic [3:0] {
    BGO_NONE       = 4'h0,
    BGO_BC0        = 4'h1,
    BGO_TEST_EN    = 4'h2,
    BGO_PRIV_GAP   = 4'h3,
    BGO_PRIV_ORBIT = 4'h4,
    BGO_L1RESET    = 4'h5,
    BGO_HARD_RESET = 4'h6,
    BGO_RES_EVCNT  = 4'h7,
    BGO_RES_ORBIT  = 4'h8,
    BGO_START_RUN  = 4'h9,
    BGO_STOP_RUN   = 4'hA
  } bgo_code_e;

  // Decoded BGO commands, one pulse bit per command.
  typedef struct packed {
    logic bc0;
    logic test_en;
    logic priv_gap;
    logic priv_orbit;
    logic l1_reset;
    logic hard_reset;
    logic evcnt_res;
    logic res_orbit;
    logic start_run;
    logic stop_run;
  } bgo_cmd_t;

  // User message: two message bits and their strobe.
  typedef struct packed {
    logic [1:0] bits;   // message bits 7..6
    logic       strb;
  } usr_msg_t;

  // COMMAND register source selections.
  typedef enum logic [2:0] {
    SEL_L1A_VME = 3'b000, SEL_L1A_TTC = 3'b001, SEL_L1A_LEMO = 3'b010,
    SEL_L1A_PER = 3'b011, SEL_L1A_TCS = 3'b100
  } sel_l1a_e;
  typedef enum logic [2:0] {
    SEL_BCRES_VME = 3'b000, SEL_BCRES_TTC = 3'b001, SEL_BCRES_ORBIT = 3'b010,
    SEL_BCRES_PER = 3'b011, SEL_BCRES_BGO = 3'b100
  } sel_bcres_e;
  typedef enum logic [1:0] {
    SEL_BGO_VME = 2'b00, SEL_BGO_TTC = 2'b01, SEL_BGO_PER = 2'b10, SEL_BGO_TCS = 2'b11
  } sel_bgo_e;
  typedef enum logic [1:0] {
    SEL_EVRES_VME = 2'b00, SEL_EVRES_TTC = 2'b01, SEL_EVRES_BGO = 2'b10, SEL_EVRES_OFF = 2'b11
  } sel_evres_e;

  // Two coded backplane lines {L1a, Reset}; BCRES travels on a third line.
  typedef enum logic [1:0] {
    BP_NOP = 2'b00, BP_RESET = 2'b01, BP_L1A = 2'b10, BP_EVCNT_RES = 2'b11
  } bp_code_e;

  // Readout data identifier, bits 17..16 of a readout word.
  typedef enum logic [1:0] {
    ID_HEADER = 2'b00, ID_EVENT = 2'b01, ID_CALIB = 2'b10, ID_BCNR = 2'b11
  } data_id_e;

  // Channel Link word type, bits 27..26.
  typedef enum logic [1:0] {
    LINK_IDLE = 2'b00, LINK_EVENT = 2'b01, LINK_MON = 2'b10
  } link_type_e;

  // 18-bit readout word: identifier and 16 data bits.
  typedef struct packed {
    data_id_e    id;
    logic [15:0] data;
  } ro_word_t;

  // VME register byte addresses.
  localparam logic [17:0] A_DLY_BASE      = 18'h1_0000; // DLY_L1,R1,L2,R2,...,L9
  localparam logic [17:0] A_DIS_BOARDS    = 18'h1_0022;
  localparam logic [17:0] A_DLY_TIM       = 18'h1_0024;
  localparam logic [17:0] A_DLY_PAN       = 18'h1_0026;
  localparam logic [17:0] A_DLY_CRATE_TTC = 18'h1_0028;
  localparam logic [17:0] A_DLY_CRATE_ECL = 18'h1_002A;
  localparam logic [17:0] A_TRIG_PERIOD   = 18'h1_0030;
  localparam logic [17:0] A_BGO_PERIOD    = 18'h1_0032;
  localparam logic [17:0] A_ORBIT_LENGTH  = 18'h1_0034;
  localparam logic [17:0] A_TTC_SUBADDR   = 18'h1_0036;
  localparam logic [17:0] A_CMD_STATUS    = 18'h1_0038;
  localparam logic [17:0] A_COMMAND       = 18'h1_003A;
  localparam logic [17:0] A_ROCMD         = 18'h1_003C;
  localparam logic [17:0] A_DLY_L1A_TCS   = 18'h1_003E;
  localparam logic [17:0] A_ROBUF_PAR     = 18'h1_0040;
  localparam logic [17:0] A_IDENTIFIER    = 18'h1_0042;
  localparam logic [17:0] A_IDLE_VALUE    = 18'h1_0044;
  localparam logic [17:0] A_EOF_VALUE     = 18'h1_0046;
  localparam logic [17:0] A_TESTDATA      = 18'h1_0048;
  localparam logic [17:0] A_MON_RQST_ID   = 18'h1_004A;
  localparam logic [17:0] A_ROBUF_BX      = 18'h1_004C;
  localparam logic [17:0] A_ROBUF_A       = 18'h1_004E;
  localparam logic [17:0] A_BAD_L1A_TTC   = 18'h1_0050;
  localparam logic [17:0] A_BC_DIFF       = 18'h1_0052;
  localparam logic [17:0] A_MAX_BCNR      = 18'h1_0054;
  localparam logic [17:0] A_TTC_BCNR      = 18'h1_0056;
  localparam logic [17:0] A_LOC_EVNR_H    = 18'h1_0058;
  localparam logic [17:0] A_LOC_EVNR_L    = 18'h1_005A;
  localparam logic [17:0] A_TTC_EVNR_H    = 18'h1_005C;
  localparam logic [17:0] A_TTC_EVNR_L    = 18'h1_005E;
  localparam logic [17:0] A_CHIP_ID_H     = 18'h1_0060;
  localparam logic [17:0] A_CHIP_ID_L     = 18'h1_0062;
  localparam logic [17:0] A_VERSION_H     = 18'h1_0064;
  localparam logic [17:0] A_VERSION_L     = 18'h1_0066;
  localparam logic [17:0] A_TTC_DUMP      = 18'h1_0080; // 16 entries to 1_009E
  localparam logic [17:0] A_BC_TABLE      = 18'h0_2000; // 4k words to 0_3FFE
  localparam logic [17:0] A_RING_BUFFER   = 18'h0_4000; // 1k words to 0_47FE

  // Number of delayed slots: L1..L9 and R1..R8.
  localparam int unsigned N_SLOTS = 17;

endpackage
