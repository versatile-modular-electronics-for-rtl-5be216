// Shared-memory map and clock rates of the limb FPGA module.
//
// Memory words are 16 bits; payload byte 2k is the low byte of word k.
//   words   0..127  receive area: payload of the module's own sub-frame
//   words 128..255  transmit area: payload sent back in that sub-frame
//   words 256..511  free for the soft CPU
// Receive area layout (set-points written by the central controller):
//   word 0/1  position set-point of axis 0/1 (encoder counts)
//   word 2    LED[15:0], word 3 bit 0 LED[16], bit 1 axis 0 enable,
//             bit 2 axis 1 enable, bit 3 space-vector stage enable
//   words 4..6 / 7..9  kp, ki, kd of axis 0 / 1
// Transmit area layout (sensor values written by the module):
//   words 128 + 6a + 0..5: filtered motor-encoder position, its velocity,
//   absolute-encoder position, its velocity, joint torque, motor current of
//   axis a; word 140 status (bit 0 watchdog expired, bit 1 axis 0 enabled,
//   bit 2 axis 1 enabled); word 141 count of received sub-frames.
// The layout is this design's; the document only says that processed sensor
// data and controller data meet in shared memory.
package fpga_map_pkg;
  localparam int unsigned CLK_HZ      = 200_000_000; // one clock per LVDS bit
  localparam int unsigned MEM_WORDS   = 512;
  localparam int unsigned RX_WORD     = 0;
  localparam int unsigned TX_WORD     = 128;
  localparam int unsigned N_AXES      = 2;
  localparam int unsigned N_PARAM     = 10;
  localparam int unsigned N_SENS      = 14;
  localparam int unsigned W_SP0       = 0;
  localparam int unsigned W_LED_LO    = 2;
  localparam int unsigned W_CTRL      = 3;
  localparam int unsigned W_GAIN0     = 4;
  localparam int unsigned W_STATUS    = TX_WORD + 12;
  localparam int unsigned W_RXCOUNT   = TX_WORD + 13;
  // loop rates of the document
  localparam int unsigned CTRL_HZ     = 5_000;     // control loop / sensor update
  localparam int unsigned ADC_HZ      = 320_000;   // ADC oversampling
  localparam int unsigned TEMP_HZ     = 50;        // temperature sensor
  localparam int unsigned SVM_HZ      = 20_000;    // space-vector modulation
  localparam int unsigned PID_PERIOD  = 8192;      // 24.4 kHz PID/PWM period in clocks
endpackage
