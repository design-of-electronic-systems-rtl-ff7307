// freqm_pkg: command codes of the sd_freq_meter. The four operations (NOP,
// full period, high half period, low half period) and the 2-bit command are
// those of the original IP; the encoding is this design's choice.
package freqm_pkg;
  typedef enum logic [1:0] {
    CMD_NOP = 2'b00,
    CMD_FP  = 2'b01,
    CMD_HP  = 2'b10,
    CMD_LP  = 2'b11
  } cmd_e;
endpackage
