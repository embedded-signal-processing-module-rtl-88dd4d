// packer: data fragment serialiser.
//
// A five-state machine (idle, header, data_header, data, trailer) with one
// word counter, as in the packer state diagram. In idle it waits for has_data
// (an event is complete in every L2 memory). It then sends, one 32-bit word
// per accepted clock (out_valid && out_ready):
//   header      8 words: start marker, header size, format version, source
//               identifier, run number, primary trigger ID, time index k,
//               primary trigger decision;
//   data_header 3 words per sub-fragment: start marker, number of data words,
//               type (type code in bits 31:24, channel number in bits 15:0);
//   data        the sub-fragment's words, popped from its L2 memory through
//               request_data[s] while read_data[s] is shown on the output;
//   trailer     3 words: number of status elements (0), number of data
//               elements, end marker.
// After each data section it returns to data_header while sub-fragments
// remain. read_done pulses with the last trailer word and releases the event.
// Sub-fragment 0 is the generic controller (SUB_WORDS_GEN words), 1..N_ADC
// the ADC channels (SUB_WORDS_ADC words each).
//
// Output backpressure (out_ready) stalls the machine in place. One fragment
// takes 1 + 8 + 3*(N_ADC+1) + SUB_WORDS_GEN + N_ADC*SUB_WORDS_ADC + 3 clocks
// without stalls. State names and field order follow the document; marker
// values and the type word encoding are this design's choices.
module packer
  import dsp_pkg::*;
#(
  parameter int unsigned N_ADC         = 32,
  parameter int unsigned SUB_WORDS_GEN = 1,
  parameter int unsigned SUB_WORDS_ADC = 3,
  localparam int unsigned N_SUB        = N_ADC + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              has_data,
  input  trig_info_t        event_info,
  input  logic [31:0]       run_number,
  input  logic [31:0]       source_id,
  input  logic [31:0]       read_data [N_SUB],
  output logic [N_SUB-1:0]  request_data,
  output logic              read_done,
  output logic [31:0]       out_data,
  output logic              out_valid,
  input  logic              out_ready,
  output pk_state_t         state
);

  localparam int unsigned SW = $clog2(N_SUB + 1);
  localparam logic [31:0] N_DATA_WORDS = 32'(SUB_WORDS_GEN + N_ADC * SUB_WORDS_ADC);

  logic [7:0]    cnt;
  logic [SW-1:0] sub;
  logic [7:0]    sub_words;
  logic          fire, last_word;

  assign sub_words = (sub == '0) ? 8'(SUB_WORDS_GEN) : 8'(SUB_WORDS_ADC);
  assign out_valid = (state != PK_IDLE);
  assign fire      = out_valid && out_ready;

  always_comb begin
    out_data     = '0;
    last_word    = 1'b0;
    request_data = '0;
    unique case (state)
      PK_HEADER: begin
        last_word = (cnt == 8'(HEADER_WORDS - 1));
        case (cnt)
          8'd0:    out_data = HEADER_MARKER;
          8'd1:    out_data = 32'(HEADER_WORDS);
          8'd2:    out_data = FORMAT_VERSION;
          8'd3:    out_data = source_id;
          8'd4:    out_data = run_number;
          8'd5:    out_data = event_info.trig_id;
          8'd6:    out_data = event_info.time_index;
          default: out_data = event_info.decision;
        endcase
      end
      PK_DATA_HEADER: begin
        last_word = (cnt == 8'(SUBHDR_WORDS - 1));
        case (cnt)
          8'd0:    out_data = SUBFRAG_MARKER;
          8'd1:    out_data = 32'(sub_words);
          default: out_data = {(sub == '0) ? TYPE_GENERIC : TYPE_ADC, 8'h00, 16'(sub)};
        endcase
      end
      PK_DATA: begin
        last_word = (cnt == sub_words - 8'd1);
        out_data  = read_data[sub];
        request_data[sub] = out_ready;
      end
      PK_TRAILER: begin
        last_word = (cnt == 8'(TRAILER_WORDS - 1));
        case (cnt)
          8'd0:    out_data = 32'd0;
          8'd1:    out_data = N_DATA_WORDS;
          default: out_data = END_MARKER;
        endcase
      end
      default: ;
    endcase
  end

  assign read_done = fire && (state == PK_TRAILER) && last_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PK_IDLE;
      cnt   <= '0;
      sub   <= '0;
    end else begin
      unique case (state)
        PK_IDLE:
          if (has_data) begin
            state <= PK_HEADER;
            cnt   <= '0;
            sub   <= '0;
          end
        default:
          if (fire) begin
            cnt <= last_word ? '0 : cnt + 1'b1;
            if (last_word) begin
              unique case (state)
                PK_HEADER:      state <= PK_DATA_HEADER;
                PK_DATA_HEADER: state <= PK_DATA;
                PK_DATA: begin
                  if (sub == SW'(N_SUB - 1)) begin
                    state <= PK_TRAILER;
                  end else begin
                    state <= PK_DATA_HEADER;
                    sub   <= sub + 1'b1;
                  end
                end
                default:        state <= PK_IDLE;
              endcase
            end
          end
      endcase
    end
  end

endmodule
