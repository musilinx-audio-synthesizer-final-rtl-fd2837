// musilinx_pkg: types and constants shared by the MusiLinx synthesizer blocks.
//
// Audio samples are 16-bit unsigned integers everywhere in the datapath (the
// VCA treats them as U(16,0), the mixer clips to all ones). The AXI-Lite bus
// that configures the voices, the sequencer and the tempo generator is carried
// as two packed structs, one per direction, so that it can pass through module
// ports (including the top's) as plain signals. The AES3 preamble codes and the
// 192-frame channel-status block length are those of the AXI Stream Audio
// format; register offsets follow the AudioVoice register map.
package musilinx_pkg;

  localparam int SAMPLE_W = 16;
  typedef logic [SAMPLE_W-1:0] sample_t;

  // Oscillator waveform codes (register 0x00 of a voice).
  typedef enum logic [1:0] {
    WAVE_TRIANGLE = 2'b00,
    WAVE_SAWTOOTH = 2'b01,
    WAVE_SQUARE   = 2'b10
  } wave_e;

  // ADSR envelope states.
  typedef enum logic [2:0] {
    ADSR_WAIT    = 3'd0,
    ADSR_ATTACK  = 3'd1,
    ADSR_DECAY   = 3'd2,
    ADSR_SUSTAIN = 3'd3,
    ADSR_RELEASE = 3'd4
  } adsr_state_e;

  // AudioVoice register word indices (byte offset = 4 * index).
  localparam int REG_WAVE_SELECT   = 0;
  localparam int REG_HALF_PERIOD   = 1;
  localparam int REG_ATTACK        = 2;
  localparam int REG_DECAY         = 3;
  localparam int REG_SUSTAIN       = 4;
  localparam int REG_SUSTAIN_DUR   = 5;
  localparam int REG_RELEASE       = 6;
  localparam int REG_VOLUME        = 7;
  localparam int VOICE_NREGS       = 8;

  // AXI-Lite, 32-bit address and data.
  localparam int AXIL_AW = 32;
  localparam int AXIL_DW = 32;
  localparam logic [1:0] AXI_RESP_OKAY   = 2'b00;
  localparam logic [1:0] AXI_RESP_DECERR = 2'b11;

  typedef struct packed {
    logic [AXIL_AW-1:0]   awaddr;
    logic                 awvalid;
    logic [AXIL_DW-1:0]   wdata;
    logic [AXIL_DW/8-1:0] wstrb;
    logic                 wvalid;
    logic                 bready;
    logic [AXIL_AW-1:0]   araddr;
    logic                 arvalid;
    logic                 rready;
  } axil_req_t;

  typedef struct packed {
    logic                 awready;
    logic                 wready;
    logic [1:0]           bresp;
    logic                 bvalid;
    logic                 arready;
    logic [AXIL_DW-1:0]   rdata;
    logic [1:0]           rresp;
    logic                 rvalid;
  } axil_rsp_t;

  // AXI Stream Audio (AES3 sub-frame) constants.
  localparam logic [3:0] PRE_BSYNC   = 4'b0001;  // channel 0 of frame 0
  localparam logic [3:0] PRE_SF1SYNC = 4'b0010;  // other even-channel sub-frames
  localparam logic [3:0] PRE_SF2SYNC = 4'b0011;  // odd-channel sub-frames
  localparam int AES_FRAMES = 192;               // frames per channel-status block
  localparam int AXIS_TID_W = 3;

endpackage
