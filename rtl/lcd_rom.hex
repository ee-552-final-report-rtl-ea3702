010
015
01f
036
048
058
065
06f
077
07f
082
086
08a
093
09c
015
038
00c
001
006
100
001
150
16f
172
174
161
141
14d
150
100
001
143
16f
16d
16d
161
16e
164
0c0
131
13d
144
14e
120
132
13d
144
154
120
133
13d
153
100
001
146
172
16f
16d
13f
0c0
131
13d
143
144
120
132
13d
145
150
150
100
001
157
161
169
174
169
16e
167
120
166
16f
172
120
154
158
100
001
144
16f
177
16e
16c
16f
161
164
169
16e
167
100
0c0
143
16f
16d
170
16c
165
174
165
100
001
153
16f
16e
167
120
158
100
080
153
16f
16e
167
120
158
100
0c0
13e
100
0c0
17c
17c
100
0c0
15b
15d
100
001
144
165
16c
165
174
165
13f
100
0c0
144
165
16c
165
174
165
164
100
001
153
174
172
165
161
16d
169
16e
167
100
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
