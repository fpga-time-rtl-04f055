# FPGA-Time: a two-FPGA video call in SystemVerilog

Two FPGA boards, each with a camera, a microphone, buttons, switches and a
VGA monitor, are joined by an Ethernet cable. Together they work like a small
FaceTime. One user presses *call*. The other board shows an incoming-call
notification and rings. That user can accept or deny the call. While the two
are connected, each board streams its camera picture and microphone audio to
the other, one video line at a time. Each user can stack picture effects on
their own video: a Santa hat, black and white, and inverted colours. A
fourth effect mixes noise into the audio. Users can also mute and switch
their camera off.

This repository holds the logic of **one board**: `rtl/fpga_time_top.sv`.
A call needs two instances connected back to back, which is what the
end-to-end testbench builds. The Ethernet MAC/UDP stack, the camera's byte
interface, the microphone ADC and the clock generator are not included. Their
signals are plain ports on the top (see "What is outside the top").

## The one idea: every packet carries one video line

The whole system revolves around a single 492-byte UDP payload:

| bits          | field   | contents |
|---------------|---------|----------|
| `[3935:3932]` | effects | the sender's effect switches, one-hot: bit 0 hat, bit 1 black and white, bit 2 invert, bit 3 audio noise |
| `[3931:3928]` | action  | call-protocol code: 0 IDLE_ACT, 1 CALL_DATA, 2 START_CALL, 3 END_CALL, 4 ACCEPT_CALL, 5 DENY_CALL |
| `[3927:3864]` | audio   | 8 signed 8-bit samples at 6 kHz, first sample in the low byte |
| `[3863:0]`    | video   | 483 bytes: `{3'b0, 320 pixels, start vcount[9:0], start hcount[10:0]}`, with pixel *i* at `[21+12i +: 12]` |

Pixels are 12-bit RGB444. A payload is produced whenever the camera side
finishes collecting a line. Building and sending that payload is what also
carries the audio, the call protocol and the effect settings. As a result
there is **no traffic outside the picture area**: for the 566 of 806 display
lines that fall outside rows 0..239, nothing is sent. A call-protocol action
can therefore take up to about 11 ms (one display frame) to reach the other
side. This is slow for video, but far quicker than a person pressing a
button.

The receiver does not reassemble frames. Each received line goes straight
into a 320x240 frame buffer at the row given by its `vcount`. The drawing
logic reads that buffer continuously. Lost or late packets therefore just
leave an old line on screen.

The sender applies no effects itself. It sends the unmodified camera line
together with its effect bits. The receiver recreates the sender's effects
when drawing, and each side applies its own effect switches to its self view.

## Clock domains

| clock         | rate              | what runs on it |
|---------------|-------------------|-----------------|
| `cam_pclk_in` | the camera's      | writes into the camera frame buffer |
| `clk_65mhz`   | 65 MHz            | 1024x768 @ 60 Hz display timing (`xvga`), self-view read, received-frame-buffer write and read, drawing |
| `clk_50mhz`   | 50 MHz            | video payload building, audio, payload assembly and parsing, call state machine, playback |

Signals cross domains in four places, each in its own way:

1. **Camera to display: a dual-port frame buffer.**
   `camera_controller` writes RGB444 pixels (the top 4 bits of each RGB565
   colour) at a counter that restarts on `frame_done`. The display reads at
   `vcount*320 + hcount`.
2. **Display to Ethernet: a 33-bit "sync buffer".**
   This is a two-word dual-port RAM that is written on every 65 MHz clock and
   read on every 50 MHz clock, always at the same address. It carries
   `{pixel, vcount, hcount}`. The 50 MHz side sees only about 50 of every 65
   counter values, and nothing guarantees that the three fields of a word
   were captured together. This is deliberate (see the next section).
3. **Ethernet to display, video: a held payload plus a toggle.**
   `rx_line_writer` copies a received 3864-bit payload into a 50 MHz
   register and flips a toggle. The toggle passes a two-register
   synchroniser. When it changes, the 65 MHz side copies the held payload and
   writes its 320 pixels into the received frame buffer, one per clock. The
   held copy stays stable for thousands of clocks, because packets are at
   least one link-busy time apart. That is why the wide bus itself needs no
   synchroniser.
4. **Ethernet to display, slow levels: two-register synchronisers.**
   `cdc_sync` carries the call state, the local effect switches and the
   received effects header into the 65 MHz domain. Reset, buttons and
   switches enter each domain the same way.

## How a video payload is built, and why the picture is imperfect

`video_payload_builder` works on the 50 MHz samples from the sync buffer.
Outside the 320x240 camera area it does nothing. Inside it:

- it waits with an empty payload until it sees `hcount == 0`;
- it then stores one pixel per 50 MHz clock at a payload index that steps by 12;
- after 320 pixels it emits the payload with the `hcount`/`vcount` seen at
  the first pixel.

Because one 50 MHz clock spans about 1.3 display pixels, the first 320
samples cover display columns 0 to about 415. Only columns 0..319 are inside
the area, so roughly 246 samples are stored from the current line. The rest
of the payload is filled at the start of the *next* line. The receiver
therefore draws about the left three quarters of each line squeezed into
the first 246 columns, followed by the beginning of the next line. The
picture appears to repeat after about two thirds of its width.

The original design reports exactly this "duplicated image" artefact, and
this implementation keeps that behaviour on purpose. Correcting it would
require the 50 MHz side to read the camera frame buffer by address instead
of sampling the display stream.

When the camera-off switch is on, the payload keeps its line tag but its
pixel field is all zero.

## Call protocol

`display_fsm` holds the call state on each side. Its states are IDLE,
CALLING, INCOMING and CONNECTED. The received action code is decoded as
follows:

- **accepted**: CALL_DATA or ACCEPT_CALL;
- **denied**: DENY_CALL;
- **incoming**: START_CALL;
- **ended**: IDLE_ACT.

The transitions are:

| from      | to        | on |
|-----------|-----------|----|
| IDLE      | INCOMING  | incoming |
| IDLE      | CALLING   | initiate button (incoming has priority) |
| CALLING   | CONNECTED | accepted |
| CALLING   | IDLE      | denied |
| INCOMING  | CONNECTED | accept button |
| INCOMING  | IDLE      | deny button, or ended |
| CONNECTED | IDLE      | end button, or ended |

`action_encoder` chooses what each packet says:

- START_CALL while CALLING;
- CALL_DATA while CONNECTED;
- IDLE_ACT otherwise.

Pressing accept, deny or end in the matching state latches ACCEPT_CALL,
DENY_CALL or END_CALL until one packet carrying it has been handed to the
sender. This matters because the local state changes immediately, and the
steady code alone would never tell the other side about a deny.

The received action is only looked at in the clock after a packet arrives
(`action_valid_in`). The previous header stays in the parse register, so
without this gating it would keep firing. One example is a START_CALL left
over from before a deny.

Two small additions make the protocol close cleanly. Both are this design's
own choices:

- the validity gating just described;
- INCOMING returns to IDLE when the caller stops calling. Otherwise a board
  whose caller hung up would ring forever.

## Audio

- **Capture** (`audio_controller`). A 48 kHz strobe (`audio_sample_trigger`,
  50 MHz / 1041) loads each microphone sample into a 31-tap low-pass FIR.
  The FIR output's top byte `y[17:10]` is kept once every eight strobes,
  which gives 6 kHz. Eight such bytes form a payload every 1.33 ms. Mute
  makes the payload all zero. `filter_in` low bypasses the FIR.
- **FIR** (`fir31`). A serial multiply-accumulate, one tap per clock, with
  the result 32 clocks after the input strobe. The coefficients are a
  Hamming-windowed sinc with a 3 kHz cutoff, scaled so that they sum to
  about 1024: `-1 -1 -3 -5 -6 -7 -5 0 10 26 46 69 91 110 123 128 123 ...`
  (symmetric). The original design gives neither the coefficients nor the
  architecture.
- **Playback** (`audio_playback`). Playback depends on the call state:
  - in CONNECTED, every eighth 48 kHz strobe takes the next received byte
    (low byte first) and passes it through a second FIR. The output byte is
    held for eight strobes, which is a zero-order-hold upsampling to 48 kHz.
    If the sender's noise bit is set, the local microphone sample is added
    (with saturation) before the FIR;
  - in INCOMING, a ±64 square wave toggles every 24 strobes (1 kHz ring tone);
  - in all other states the output is silence.

  The result is available both as a signed byte and as an 8-bit PWM bit.

The original description is inconsistent about two points:

- **Filter order.** One passage says the microphone is "downsampled, then
  filtered". Its own payload logic, however, filters at 48 kHz and keeps
  every eighth output. The second reading is implemented.
- **Noise effect.** The noise effect is described once as acting on the
  sender's microphone and once as acting on the receiver's. The top follows
  the effects description: the noise bit travels in the header, and the
  receiver mixes in its own microphone. `audio_controller` still has the
  sender-side input (`apply_echo_in`), but the top ties it low.

## Picture effects and the screen layout

`video_effects` is purely combinational. It applies the effects in this order:

1. **Black and white:** white if R+G+B ≥ 24, else black.
2. **Hat:** a 32x32 red-and-white Santa hat drawn at (144, 8) of the 320x240
   picture. Black hat pixels are transparent.
3. **Invert:** all 12 bits negated.

The hat is generated by a function made of a few shapes: a triangle, a brim
and a ball. No image file is used.

`pixel_drawer` lays out the screen as follows:

- **self view** at columns 0..319, rows 0..239, always shown, with the local
  effects applied;
- **received area** at columns 320..639, rows 0..239:
  - in CONNECTED, the received frame buffer with the sender's effects;
  - in INCOMING, a solid green notification;
  - otherwise, black.

The received-frame-buffer address is combinational from the counters. RGB,
hsync and vsync leave two clocks after the counters, all with the same
delay.

## What is outside the top

| part | top-level ports |
|------|-----------------|
| camera byte interface (assembles camera bytes into RGB565 pixels) | `cam_pclk_in`, `cam_pixel_in[15:0]`, `cam_pixel_valid_in`, `cam_frame_done_in` |
| UDP send/receive with CRC, MAC and PHY | `eth_tx_payload_out`, `eth_tx_send_out`, `eth_tx_busy_in`, `eth_rx_payload_in`, `eth_rx_valid_in` |
| microphone ADC | `mic_in[7:0]` (signed) |
| clock generation | `clk_50mhz`, `clk_65mhz` |

A packet is handed to the sender only when `eth_tx_busy_in` is low. A video
payload that completes while the sender is busy is dropped, and
`ethernet_controller` counts it. A payload completes about every second
display line, because it spills into the next line. With a 100 Mb/s link, a
packet occupies the sender for slightly more than two display lines, so many
payloads are dropped and only part of the 240 rows is refreshed in each
frame. The other rows keep the line from an earlier frame.

## Where this design departs from the original

- **Display timing.** 1024x768 at 60 Hz is used, because that is the mode a
  65 MHz pixel clock drives (see "How far to trust it").
- **Camera frame buffer read clock.** One block diagram of the original shows
  the camera frame buffer read on the 50 MHz clock. Its text, however, says
  the buffer is read at 65 MHz, and that is the clock the self view is drawn
  on. This design reads it at 65 MHz.
- **Audio filter order and noise side.** See the Audio section.
- **Protocol additions.** Received actions are gated by packet arrival, and
  INCOMING falls back to IDLE when the caller stops. See Call protocol.
- **Hat image.** It is generated in logic rather than loaded from an image
  file.
- **Buttons.** They are synchronised but not debounced. The protocol only
  needs one packet to carry a press, so bounces are harmless: extra presses
  in the wrong state are ignored.
- **What is deliberately kept.** The line spill of the payload builder (the
  duplicated-image artefact) and the packet drops while the sender is busy
  are kept as they are.

## Files

`rtl/` holds one module per file, plus `fpga_time_pkg.sv`, which contains the
payload layout, the action and state codes, the effect bit positions and the
FIR coefficients. Each file opens with a comment describing its interface and
timing, and says which parts follow the original design and which are this
design's own choices.

| module | role |
|--------|------|
| `fpga_time_top` | one board |
| `camera_controller` | camera frame buffer, self-view read, sync buffer, payload builder |
| `video_payload_builder` | one line into a 483-byte video payload |
| `dual_port_ram` | two-clock block RAM with a registered read (frame buffers, sync buffer) |
| `xvga` | 1024x768 60 Hz timing |
| `audio_sample_trigger`, `audio_controller`, `fir31`, `audio_playback` | audio |
| `ethernet_controller` | payload assembly and parsing, busy/drop handling |
| `display_fsm`, `action_encoder` | call protocol |
| `cdc_sync`, `rx_line_writer` | clock crossings |
| `video_effects`, `pixel_drawer` | drawing |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). It
also holds two behavioural models used by the end-to-end test:

- `camera_model`, which sends numbered test pictures;
- `eth_link_model`, which models a link that is busy for 2184 clocks (546
  bytes at 100 Mb/s over a 2-bit RMII bus) and then delivers the payload.

`tb_fpga_time_top` connects two complete boards and plays through a whole
call, with every parameter at its default. The script is:

1. call and deny;
2. call and accept;
3. one frame with all effects on;
4. mute and camera off;
5. hang up.

Along the way the test checks:

- each received line's tag, effects and pixels, including where the line
  spills into the next row (between pixels 230 and 260);
- the contents of the received frame buffer;
- the ring tone, the notification, the drawn effects and the playback.

It also counts each mechanism and fails if any of them never occurs. The
mechanisms are call, incoming, deny, accept, end, tone, notification, line
write, effects, mute, camera off, dropped packet, noise mixing and line
spill. It
simulates about 33 ms of both boards in a few seconds.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each one also has a watchdog. With Verilator 5:

```
verilator --binary --timing --top-module tb_fpga_time_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/fpga_time_pkg.sv tb/tb_fpga_time_top.sv
./obj_dir/Vtb_fpga_time_top +verilator+rand+reset+2
```

To run another block, substitute its testbench name. The designs reset every
register that is read, so the results do not depend on the initial values.

## How far to trust it

- The call protocol, payload format, effects, audio path and clock crossings
  are all checked in simulation between two complete boards. The unit
  testbenches compare against independently computed values: a reference FIR
  sum, the RGB rules, and the XVGA counts and sync positions.
- None of this has run on hardware. The camera, UDP and link models are
  simple behavioural stand-ins. In particular, a real UDP core's
  `busy`/`valid` timing may differ.
- The following are this design's own inventions, because the original
  design gives no values for them:
  - the FIR coefficients;
  - the hat picture;
  - the hat position;
  - the notification colour;
  - the tone frequency;
  - the screen positions;
  - the payload bit positions.

  Any of them may be changed freely.
- The original description gives the display as "640x480 at 65 MHz". Since
  65 MHz is the standard 1024x768 pixel clock, this design uses 1024x768
  timing. Only the top-left 640x240 region of the screen is used.
